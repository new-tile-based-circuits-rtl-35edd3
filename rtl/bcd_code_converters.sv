// bcd_code_converters: the three tile-based BCD code converters side by side.
//
// BCD to gray, BCD to excess-3 and BCD to aiken (2421) are three independent
// circuits; each has its own BCD input and code output here. They share the
// zone clock clk (one rising edge per QCA clock phase) and the synchronous
// reset rst. Each output carries the code of the digit applied to its input
// GRAY_PHASES, XS3_PHASES or AIKEN_PHASES edges earlier (3, 7 and 5 phases,
// that is 0.75, 1.75 and 1.25 clock cycles, in the published layouts), and
// each converter takes a new digit on every edge.
module bcd_code_converters
  import qca_pkg::*;
#(
  parameter int unsigned GRAY_PHASES_P  = GRAY_PHASES,
  parameter int unsigned XS3_PHASES_P   = XS3_PHASES,
  parameter int unsigned AIKEN_PHASES_P = AIKEN_PHASES
) (
  input  logic   clk,
  input  logic   rst,
  input  bcd_t   gray_bcd,
  output gray_t  gray_code,
  input  bcd_t   xs3_bcd,
  output xs3_t   xs3_code,
  input  bcd_t   aiken_bcd,
  output aiken_t aiken_code
);

  bcd2gray  #(.PHASES(GRAY_PHASES_P))  u_gray  (.clk, .rst, .bcd(gray_bcd),  .gray(gray_code));
  bcd2xs3   #(.PHASES(XS3_PHASES_P))   u_xs3   (.clk, .rst, .bcd(xs3_bcd),   .xs3(xs3_code));
  bcd2aiken #(.PHASES(AIKEN_PHASES_P)) u_aiken (.clk, .rst, .bcd(aiken_bcd), .aiken(aiken_code));

endmodule
