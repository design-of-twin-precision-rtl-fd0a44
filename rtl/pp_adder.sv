// pp_adder -- final adder of the twin-precision multiplier.
//
// In full-precision mode (full = 1) it assembles the N x N product from the
// four N/2 x N/2 sub-products of the two clock-pipelined multipliers:
//   P = LL + (LH + HL) * 2^(N/2) + HH * 2^N
// where L and H are the low and high halves of the operands. With tc = 1
// (two's complement operands) the high halves are signed and the low halves
// unsigned, so LL is extended with zeros and LH, HL and HH with their sign;
// with tc = 0 every sub-product is unsigned. P is 2N bits wide and exact.
//
// In twin mode (full = 0) the two N/2 x N/2 products LL and HH are
// independent results and are returned side by side: P = {HH, LL}.
//
// Purely combinational. The split into four sub-products follows the design;
// how the adder is built (one behavioural sum) is this design's own choice.
module pp_adder #(
  parameter int unsigned N = 8
) (
  input  logic           full,
  input  logic           tc,
  input  logic [N-1:0]   ll,
  input  logic [N-1:0]   lh,
  input  logic [N-1:0]   hl,
  input  logic [N-1:0]   hh,
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;

  logic [2*N-1:0] ll_x, lh_x, hl_x, hh_x;

  always_comb begin
    ll_x = {{N{1'b0}}, ll};
    lh_x = {{N{tc & lh[N-1]}}, lh};
    hl_x = {{N{tc & hl[N-1]}}, hl};
    hh_x = {{N{tc & hh[N-1]}}, hh};
    if (full) p = ll_x + ((lh_x + hl_x) << H) + (hh_x << N);
    else      p = {hh, ll};
  end

endmodule
