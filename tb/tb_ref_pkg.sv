// tb_ref_pkg: reference models for the code converter testbenches.
//
// Each code is computed arithmetically from the digit value, not from the
// gate equations used in the RTL:
//   gray      n XOR (n >> 1)
//   excess-3  n + 3
//   aiken     n for n < 5, n + 6 for n >= 5 (weights 2 4 2 1, the
//             self-complementing choice for 5..9)
package tb_ref_pkg;

  function automatic logic [3:0] ref_gray(input logic [3:0] n);
    return n ^ (n >> 1);
  endfunction

  function automatic logic [3:0] ref_xs3(input logic [3:0] n);
    return n + 4'd3;
  endfunction

  function automatic logic [3:0] ref_aiken(input logic [3:0] n);
    return (n < 4'd5) ? n : n + 4'd6;
  endfunction

  // Decimal value of a 2421-weighted code word.
  function automatic int aiken_value(input logic [3:0] w);
    return 2 * w[3] + 4 * w[2] + 2 * w[1] + w[0];
  endfunction

  // A random BCD digit 0..9.
  function automatic logic [3:0] rand_digit();
    return 4'($urandom_range(9, 0));
  endfunction

endpackage
