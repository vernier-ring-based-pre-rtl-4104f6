`timescale 1ps/1ps
// Sel configuration register: a SEL_W-bit shift register that takes the
// address of the TSV under test serially, MSB first, one bit per test clock
// cycle while shift_en is high. Loading the 4-bit Sel code therefore takes
// four cycles, as in the reference test sequence. The serial loading itself
// is this implementation's reading of why selection takes one cycle per bit.
// Asynchronous active-low reset to TSV 0.
module sel_config_reg #(
  parameter int unsigned SEL_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic             si,          // serial Sel bit, MSB first
  output logic [SEL_W-1:0] sel
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sel <= '0;
    else if (shift_en) sel <= {sel[SEL_W-2:0], si};
  end

endmodule
