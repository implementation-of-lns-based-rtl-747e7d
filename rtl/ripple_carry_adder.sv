// ripple_carry_adder: W-bit adder made of a chain of one-bit adders.
// sum = a + b + ci, with the carry out of the top bit on co. Bit 0 is a half
// adder when USE_CIN is 0 (the carry input is then ignored) and a full adder
// otherwise; every other bit is a full adder, so the carry ripples from bit 0
// upward. Purely combinational.
// The multiplier uses half and full adders for its additions; the ripple
// organisation and the USE_CIN option are this design's choice.
module ripple_carry_adder #(
  parameter int unsigned W       = 8,
  parameter bit          USE_CIN = 1'b1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;

  if (USE_CIN) begin : g_lsb_fa
    assign c[0] = ci;
    full_adder u_fa0 (.a(a[0]), .b(b[0]), .ci(c[0]), .s(s[0]), .co(c[1]));
  end else begin : g_lsb_ha
    // The carry input is not used in this configuration.
    assign c[0] = 1'b0;
    half_adder u_ha0 (.a(a[0]), .b(b[0]), .s(s[0]), .co(c[1]));
  end

  for (genvar i = 1; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign co = c[W];
endmodule
