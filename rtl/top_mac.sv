// top_mac -- multiply-accumulate unit built on the twin-precision multiplier.
//
// Two stages, as in a classic MAC:
//   multiplier stage   x, y, sel and tc are captured on a rising edge by the
//                      operand registers of the twin-precision multiplier,
//                      whose product is ready one cycle later;
//   accumulator stage  the product is registered (mult_out), added to the
//                      accumulator register (acc) and the sum (result =
//                      mult_out + acc) is written back into acc on the next
//                      rising edge.
// In full-precision mode (sel = 11) the addend is the 2N-bit product x * y.
// In twin mode (sel = 01 or 10) the multiplier returns two N/2 x N/2
// products of the operand halves and their sum is accumulated, i.e. a
// two-element dot product x_hi*y_hi + x_lo*y_lo per cycle. With sel = 00 no
// product is formed and acc holds. tc selects two's complement (1) or
// unsigned (0) operands and accumulation.
//
// overflow is high while the sum being formed does not fit in ACC_W bits
// (signed overflow with tc = 1, carry out with tc = 0); acc then wraps.
//
// Timing: operands at rising edge k; mult_out and mult_valid after edge k+2;
// result is combinational from mult_out and acc; acc holds the new sum after
// edge k+3. One operation per cycle. rst is synchronous, active high, and
// clears the accumulator.
//
// The two-stage structure, the 16-bit operands, the 32-bit accumulator, the
// overflow output and result = X*Y + ACC follow the design; the twin-mode
// dot product, the idle code and the reset are this design's own choices.
module top_mac #(
  parameter int unsigned N     = 16,
  parameter int unsigned ACC_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [1:0]       sel,
  input  logic             tc,
  input  logic [N-1:0]     x,
  input  logic [N-1:0]     y,
  output logic [2*N-1:0]   mult_out,
  output logic             mult_valid,
  output logic [ACC_W-1:0] acc,
  output logic [ACC_W-1:0] result,
  output logic             overflow
);

  logic [2*N-1:0] p;
  logic           p_full, p_tc, p_valid;

  twin_precision_multiplier #(.N(N)) u_mult (
    .clk, .rst, .sel, .tc,
    .a(x), .b(y),
    .p, .full_out(p_full), .tc_out(p_tc), .valid(p_valid)
  );

  // Accumulator-stage input register.
  logic m_full, m_tc;
  always_ff @(posedge clk) begin
    if (rst) begin
      mult_out   <= '0;
      mult_valid <= 1'b0;
      m_full     <= 1'b0;
      m_tc       <= 1'b0;
    end else begin
      mult_valid <= p_valid;
      if (p_valid) begin
        mult_out <= p;
        m_full   <= p_full;
        m_tc     <= p_tc;
      end
    end
  end

  // Addend: the product, or the sum of the two twin products.
  logic [ACC_W-1:0] addend;
  logic [N-1:0]     tw_lo, tw_hi;
  always_comb begin
    {tw_hi, tw_lo} = mult_out;
    if (!mult_valid)
      addend = '0;
    else if (m_full)
      addend = ACC_W'($signed({m_tc & mult_out[2*N-1], mult_out}));
    else
      addend = ACC_W'($signed({m_tc & tw_hi[N-1], tw_hi}))
             + ACC_W'($signed({m_tc & tw_lo[N-1], tw_lo}));
  end

  logic [ACC_W:0] sum_x;
  always_comb begin
    sum_x  = {1'b0, acc} + {1'b0, addend};
    result = sum_x[ACC_W-1:0];
    if (m_tc)
      overflow = mult_valid && (acc[ACC_W-1] == addend[ACC_W-1])
                            && (result[ACC_W-1] != acc[ACC_W-1]);
    else
      overflow = mult_valid && sum_x[ACC_W];
  end

  always_ff @(posedge clk) begin
    if (rst)             acc <= '0;
    else if (mult_valid) acc <= result;
  end

  // Accumulator only moves when a product arrives.
  a_acc_holds: assert property (@(posedge clk) disable iff (rst)
                                !mult_valid |=> $stable(acc));

endmodule
