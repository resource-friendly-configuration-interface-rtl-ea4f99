// tb_i2c_bus_sync: checks the synchronizer and condition detector.
//
// Random bus activity: every few cycles SCL or SDA (never both) toggles.
// For each change the testbench classifies the event itself from the levels
// it drove (SCL edge, START = SDA falls while SCL high, STOP = SDA rises while
// SCL high, or nothing for SDA moving while SCL is low) and expects exactly
// that strobe, for one cycle, SYNC_STAGES clk edges later. Counts of each
// event type are compared at the end, and each type must have occurred.
module tb_i2c_bus_sync;
  import i2c_slave_pkg::*;

  localparam int STAGES = 2;
  localparam int EVENTS = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      reset, scl, sda;
  i2c_cond_t cond;

  i2c_bus_sync #(.SYNC_STAGES(STAGES)) dut (
    .clk(clk), .reset(reset), .scl(scl), .sda(sda), .cond(cond)
  );

  typedef enum int {EV_NONE, EV_RISE, EV_FALL, EV_START, EV_STOP} ev_e;

  int checks = 0, failures = 0;
  int n_exp[5], n_got[5];
  ev_e exp_q[$];         // expected strobe per cycle, STAGES cycles ahead
  logic [1:0] lvl_q[$];  // expected {scl, sda} levels, STAGES cycles ahead

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  function automatic ev_e seen();
    int n = cond.scl_rise + cond.scl_fall + cond.start + cond.stop;
    if (n > 1)         return ev_e'(-1);
    if (cond.scl_rise) return EV_RISE;
    if (cond.scl_fall) return EV_FALL;
    if (cond.start)    return EV_START;
    if (cond.stop)     return EV_STOP;
    return EV_NONE;
  endfunction

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ev_e e, s;
    logic [1:0] lv;
    scl = 1'b1; sda = 1'b1; reset = 1'b1;
    repeat (4) @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < STAGES; i++) begin exp_q.push_back(EV_NONE); lvl_q.push_back(2'b11); end
    for (int k = 0; k < EVENTS * 4; k++) begin
      @(negedge clk);
      // check what the detector shows now against what was driven STAGES edges ago
      s = seen();
      e = exp_q.pop_front();
      check(s == e, $sformatf("cycle %0d: strobe %0d, expected %0d", k, s, e));
      if (int'(s) >= 0) n_got[s]++;
      lv = lvl_q.pop_front();
      check({cond.scl, cond.sda} == lv, $sformatf("cycle %0d: levels", k));
      // drive a new event every 4th cycle
      e = EV_NONE;
      if (k % 4 == 0) begin
        if ($urandom_range(1, 0) == 1) begin
          e = scl ? EV_FALL : EV_RISE;
          scl = ~scl;
        end else begin
          if (scl) e = sda ? EV_START : EV_STOP;
          sda = ~sda;
        end
      end
      n_exp[e]++;
      exp_q.push_back(e);
      lvl_q.push_back({scl, sda});
    end
    // the strobes of the last STAGES events are still in flight
    for (int i = 0; i < STAGES; i++) begin
      @(negedge clk);
      s = seen(); e = exp_q.pop_front();
      check(s == e, "tail strobe");
      if (int'(s) >= 0) n_got[s]++;
      n_exp[EV_NONE]++;  // the cycles driven after the loop add no events
    end
    for (int t = 1; t <= 4; t++) begin
      check(n_got[t] == n_exp[t], $sformatf("event %0d: %0d strobes, %0d events", t, n_got[t], n_exp[t]));
      check(n_exp[t] > 0, $sformatf("event %0d occurred", t));
    end
    check(cond.scl == scl && cond.sda == sda, "synchronized levels follow the pads");
    $display("rise=%0d fall=%0d start=%0d stop=%0d", n_got[1], n_got[2], n_got[3], n_got[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
