`timescale 1ps/1ps
// Code scan-out register: loads the CODE_W-bit digital code in parallel at
// the end of the measurement cycle and shifts it out MSB first, one bit per
// test clock cycle, so a 7-bit code leaves in seven cycles. so always shows
// the current MSB; zeros are shifted in behind. Asynchronous active-low
// reset. Load has priority over shift.
module code_scan_reg #(
  parameter int unsigned CODE_W = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              shift_en,
  input  logic [CODE_W-1:0] d,
  output logic              so
);

  logic [CODE_W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sr <= '0;
    else if (load)     sr <= d;
    else if (shift_en) sr <= {sr[CODE_W-2:0], 1'b0};
  end

  assign so = sr[CODE_W-1];

endmodule
