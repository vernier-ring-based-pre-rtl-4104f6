`timescale 1ps/1ps
// Testbench for pre_logic: random functional signals, test transition,
// test enables, Sel code and receiver values. Each driver must carry its
// functional signal when its enable is 1 and the test transition when it is
// 0; lead must be the receiver picked by Sel and lag the reference receiver.
// Normal mode (all enables 1) and single-TSV test mode are both exercised.
module pre_logic_tb;
  localparam int unsigned N = 16;
  int checks = 0, failures = 0;
  logic [N-1:0] func_in, s_n, tsv_rcv, tsv_drv;
  logic test_in, ref_rcv, lead, lag;
  logic [3:0] sel;
  int n_normal = 0, n_test = 0;

  pre_logic #(.N_TSV(N)) dut (.*);

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
    for (int it = 0; it < 400; it++) begin
      logic [N-1:0] exp_drv;
      func_in = N'($urandom); tsv_rcv = N'($urandom);
      test_in = 1'($urandom); ref_rcv = 1'($urandom);
      sel     = 4'($urandom);
      case (it % 3)
        0:       begin s_n = '1; n_normal++; end
        1:       begin s_n = ~(N'(1) << sel); n_test++; end
        default: s_n = N'($urandom);
      endcase
      #10;
      for (int i = 0; i < int'(N); i++) exp_drv[i] = s_n[i] ? func_in[i] : test_in;
      chk(tsv_drv == exp_drv, $sformatf("drivers %h exp %h", tsv_drv, exp_drv));
      chk(lead == tsv_rcv[sel], "lead is selected receiver");
      chk(lag == ref_rcv, "lag is reference receiver");
    end
    chk(n_normal > 0 && n_test > 0, "both modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
