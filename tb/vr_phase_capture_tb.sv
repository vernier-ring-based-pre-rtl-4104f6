`timescale 1ps/1ps
// Testbench for vr_phase_capture. Two delay rings (slow 160 ps, fast 150 ps
// buffers) feed the capture block; a lead edge and a lag edge t_M later are
// applied. For each t_M the expected state is worked out from the stage
// arithmetic alone: c = number of stages n >= 1 with n*R < t_M, catch lap
// L = c/NS + 1, catch stage k = c mod NS. The catch lap's chain must hold k
// ones, the previous lap's chain all ones, the lap counters L in total, and
// the caught flag must match the lap parity. A second instance with a lap
// limit of 4 checks that counting stops when no catch happens in time.
module vr_phase_capture_tb;
  localparam int unsigned NS = 8, TS = 160, TF = 150, NAND = 30, R = TS - TF;
  localparam int unsigned LAP_W = 4, LIMIT = 17, SHORT = 4;
  localparam int unsigned LAP = NAND + NS*TS;
  int checks = 0, failures = 0;
  logic lead = 1'b0, lag = 1'b0, clr = 1'b0;
  logic [NS-1:0] slow_tap, fast_tap, qa, qb, qa2, qb2;
  logic [LAP_W-1:0] laps_r, laps_f, laps_r2, laps_f2;
  logic caught_r, caught_f, caught_r2, caught_f2;
  int n_odd = 0, n_even = 0, n_limit = 0;

  delay_ring #(.NS(NS), .BUF_PS(TS), .NAND_PS(NAND)) u_slow (.start(lead), .tap(slow_tap));
  delay_ring #(.NS(NS), .BUF_PS(TF), .NAND_PS(NAND)) u_fast (.start(lag),  .tap(fast_tap));

  vr_phase_capture #(.NS(NS), .LAP_W(LAP_W), .LAP_LIMIT(LIMIT)) dut (
    .clr, .slow_tap, .fast_tap, .qa, .qb, .laps_r, .laps_f, .caught_r, .caught_f);
  vr_phase_capture #(.NS(NS), .LAP_W(LAP_W), .LAP_LIMIT(SHORT)) dut_short (
    .clr, .slow_tap, .fast_tap, .qa(qa2), .qb(qb2), .laps_r(laps_r2), .laps_f(laps_f2),
    .caught_r(caught_r2), .caught_f(caught_f2));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic measure(input int tm);
    int c, L, k;
    logic [NS-1:0] last, prev;
    c = 0;
    for (int n = 1; n <= int'(LIMIT*NS); n++) if (n*int'(R) < tm) c++;
    L = c / NS + 1;
    k = c % NS;
    lead = 0; lag = 0;
    #(3*LAP);
    clr = 1; #1000; clr = 0; #1000;
    if (tm >= 0) begin
      lead = 1; #(tm); lag = 1;
    end else begin
      lag = 1; #(-tm); lead = 1;
    end
    #((LIMIT + 2) * LAP);
    last = (L % 2 == 1) ? qb : qa;
    prev = (L % 2 == 1) ? qa : qb;
    chk(caught_f == (L % 2 == 1) && caught_r == (L % 2 == 0),
        $sformatf("tm=%0d caught flags r=%b f=%b L=%0d", tm, caught_r, caught_f, L));
    chk(int'(laps_r) + int'(laps_f) == L, $sformatf("tm=%0d laps %0d+%0d != %0d", tm, laps_r, laps_f, L));
    chk(last == NS'((1 << k) - 1), $sformatf("tm=%0d catch chain %b k=%0d", tm, last, k));
    chk(prev == ((L == 1) ? '0 : '1), $sformatf("tm=%0d previous chain %b", tm, prev));
    if (L % 2 == 1) n_odd++; else n_even++;
    // Short lap limit: no catch within SHORT laps leaves both flags low.
    if (L > int'(SHORT)) begin
      n_limit++;
      chk(!caught_r2 && !caught_f2 && int'(laps_r2) + int'(laps_f2) == int'(SHORT),
          $sformatf("tm=%0d lap limit", tm));
    end else begin
      chk((caught_r2 | caught_f2) && int'(laps_r2) + int'(laps_f2) == L, $sformatf("tm=%0d short copy", tm));
    end
    lead = 0; lag = 0;
    #(3*LAP);
  endtask

  initial begin
    #3000000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int tms[12] = '{-50, 3, 45, 75, 85, 155, 233, 405, 627, 805, 1001, 1275};
    #5000;
    foreach (tms[i]) measure(tms[i]);
    for (int i = 0; i < 10; i++) measure(int'($urandom_range(1280, 1)) | 1);
    chk(n_odd > 0 && n_even > 0 && n_limit > 0, "catch on odd lap, even lap and lap limit all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
