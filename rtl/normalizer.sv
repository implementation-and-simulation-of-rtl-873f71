// normalizer: puts the leading one of the intermediate product in place.
//
// With normal operands the 2M-bit intermediate product (IP) has its leading
// one at bit 2M-1 or 2M-2 (bits 47 or 46 for single precision); the binary
// point lies between bits 2M-2 and 2M-3. If bit 2M-1 is set, a row of 2:1
// multiplexers shifts the IP right by one place and the exponent is
// incremented by feeding a carry into a ripple-carry adder; otherwise both
// pass unchanged. The fraction is the F bits just below the leading one;
// the bits below are dropped (truncation, the design does not round).
// Combinational.
module normalizer
  import fpm_pkg::*;
#(
  parameter int unsigned F = FRAC_W          // fraction width
) (
  input  logic [2*F+1:0] ip,         // intermediate product, 2(F+1) bits
  input  logic [EI_W-1:0] exp_in,    // signed intermediate exponent
  output logic [F-1:0]   frac,       // truncated fraction
  output logic [EI_W-1:0] exp_out,   // signed exponent after normalisation
  output logic           shifted     // a right shift was made
);
  localparam int unsigned W = 2*F+2;

  logic [W-2:0] ip_norm;   // IP with its leading one at bit W-2
  logic         c_unused;

  assign shifted = ip[W-1];

  always_comb begin
    if (shifted) ip_norm = ip[W-1:1];
    else         ip_norm = ip[W-2:0];
  end

  assign frac = ip_norm[W-3 -: F];

  ripple_carry_adder #(.N(EI_W)) u_inc (
    .a   (exp_in),
    .b   ('0),
    .cin (shifted),
    .sum (exp_out),
    .cout(c_unused)   // carry out of a two's complement add carries no information
  );
endmodule
