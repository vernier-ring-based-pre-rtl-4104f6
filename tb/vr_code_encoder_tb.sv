`timescale 1ps/1ps
// Testbench for vr_code_encoder: drives every catch lap 1..17 with every
// catch stage 0..7 (as the capture block leaves them: thermometer in the
// catch lap's chain, all ones in the other), plus no-catch cases, and checks
// code = (laps-1)*8 + stage with saturation and overflow above 127.
module vr_code_encoder_tb;
  localparam int unsigned NS = 8, LAP_W = 4, CODE_W = 7;
  int checks = 0, failures = 0;
  logic [NS-1:0] qa, qb;
  logic [LAP_W-1:0] laps_r, laps_f;
  logic caught_r, caught_f, overflow;
  logic [CODE_W-1:0] code;
  int n_ovf = 0;

  vr_code_encoder #(.NS(NS), .LAP_W(LAP_W), .CODE_W(CODE_W)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000 $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int L = 1; L <= 17; L++) begin
      for (int k = 0; k < int'(NS); k++) begin
        logic [NS-1:0] thermo;
        int exp;
        thermo   = NS'((1 << k) - 1);
        laps_f   = LAP_W'((L + 1) / 2);
        laps_r   = LAP_W'(L / 2);
        caught_f = (L % 2 == 1);
        caught_r = (L % 2 == 0);
        qb = caught_f ? thermo : '1;
        qa = caught_r ? thermo : ((L == 1) ? '0 : '1);
        #10;
        exp = (L - 1) * int'(NS) + k;
        if (exp > 127) begin
          n_ovf++;
          chk(overflow && code == '1, $sformatf("L=%0d k=%0d saturate", L, k));
        end else begin
          chk(!overflow && int'(code) == exp, $sformatf("L=%0d k=%0d code=%0d exp=%0d", L, k, code, exp));
        end
      end
    end
    // No catch at all: overflow whatever the chains hold.
    for (int i = 0; i < 20; i++) begin
      qa = NS'($urandom); qb = NS'($urandom);
      laps_r = LAP_W'($urandom_range(9)); laps_f = LAP_W'($urandom_range(9));
      caught_r = 0; caught_f = 0;
      #10 chk(overflow && code == '1, "no catch gives overflow");
    end
    chk(n_ovf > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
