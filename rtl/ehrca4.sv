// ehrca4: 4-bit Enhanced Half Ripple Carry Adder.
//
// Each bit slice first forms, from its own operand bits only, a half-adder
// sum h = a^b and carry g = a&b, and the OR of the two (a|b). These are the
// bit's carry-out for an incoming carry of 0 and of 1, so a 2:1 multiplexer
// selected by the incoming carry gives the carry-out. Everything but the
// multiplexer chain therefore works in parallel; only the muxes ripple. The
// sum bit combines h with the incoming carry (xor).
//
// The structure (half adders, OR gates, muxes on the carry path, carry in at
// the least significant slice) follows the published 4-bit circuit; the mux
// input order and the xor sum gate are the choices that make it add.
//
// Interface: s + 16*cout = a + b + cin. Combinational, no clock.
module ehrca4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);

  logic [3:0] h;      // half-adder sum
  logic [3:0] g;      // half-adder carry: carry-out when the carry in is 0
  logic [3:0] p;      // OR of the half-adder outputs: carry-out when it is 1

  for (genvar i = 0; i < 4; i++) begin : g_slice
    half_adder u_ha (
      .a (a[i]),
      .b (b[i]),
      .s (h[i]),
      .c (g[i])
    );
    assign p[i] = h[i] | g[i];
  end

  // Mux chain: the only part that waits for the carry.
  always_comb begin
    logic carry;
    carry = cin;
    for (int i = 0; i < 4; i++) begin
      s[i]  = h[i] ^ carry;
      carry = carry ? p[i] : g[i];
    end
    cout = carry;
  end

endmodule
