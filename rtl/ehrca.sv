// ehrca: WIDTH-bit Enhanced Half Ripple Carry Adder.
//
// Built as a chain of 4-bit EHRCA cells, the carry out of one cell driving
// the carry in of the next. Inside each cell only the carry multiplexers
// ripple, so the whole adder has one mux per bit on its carry path while the
// half adders and OR gates of all bits settle in parallel. The 16-bit
// default is the adder width used throughout the DWT datapath.
//
// Interface: s + 2**WIDTH * cout = a + b + cin. With b inverted and cin = 1
// it subtracts. Combinational. WIDTH must be a multiple of 4.
module ehrca #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int NCELL = WIDTH / 4;

  initial assert (WIDTH % 4 == 0 && WIDTH >= 4)
    else $error("ehrca: WIDTH (%0d) must be a positive multiple of 4", WIDTH);

  for (genvar k = 0; k < NCELL; k++) begin : g_cell
    logic ci;
    logic co;
    if (k == 0) begin : g_first
      assign ci = cin;
    end else begin : g_next
      assign ci = g_cell[k-1].co;
    end
    ehrca4 u_cell (
      .a    (a[4*k +: 4]),
      .b    (b[4*k +: 4]),
      .cin  (ci),
      .s    (s[4*k +: 4]),
      .cout (co)
    );
  end

  assign cout = g_cell[NCELL-1].co;

endmodule
