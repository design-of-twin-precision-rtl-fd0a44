// tb_top_mac -- end-to-end test of the multiply-accumulate unit at its
// default size (16-bit operands, 32-bit accumulator).
//
// A cycle-level reference model in the testbench follows every operation:
// an operand set applied before rising edge k shows up in mult_out after
// edge k+2, result = mult_out + acc is checked then, and acc holds the sum
// after edge k+3. The run contains:
//   1. X = Y = 1..9 as signed full-precision products (sum of squares, 285),
//      then the same as unsigned;
//   2. random full, twin and idle operations, signed and unsigned;
//   3. unsigned and signed accumulator overflow;
//   4. a reset in the middle of a run, which must clear the accumulator.
// Each of these mechanisms is counted and must occur at least once.
module tb_top_mac;
  localparam int N = 16, ACC_W = 32, H = N / 2;
  int checks = 0, failures = 0;
  int n_full = 0, n_twin = 0, n_idle = 0, n_ovf_u = 0, n_ovf_s = 0, n_reset = 0;

  logic clk = 0, rst = 1, tc = 0;
  logic [1:0] sel = 0;
  logic [N-1:0] x = 0, y = 0;
  logic [2*N-1:0] mult_out;
  logic mult_valid, overflow;
  logic [ACC_W-1:0] acc, result;

  top_mac dut (.clk, .rst, .sel, .tc, .x, .y, .mult_out, .mult_valid, .acc, .result, .overflow);

  always #5 clk = ~clk;

  function automatic longint val(input longint u, input bit s, input int w);
    if (s && u[w-1]) return u - (longint'(1) << w);
    return u;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // History of applied operations: product bits, addend and signedness.
  typedef struct {
    bit             valid;
    bit             tc;
    logic [2*N-1:0] prod;
    longint         addend;
  } op_t;

  op_t    hist [$];
  longint racc;       // reference accumulator, kept in ACC_W bits
  bit     in_reset;

  function automatic op_t make_op(input logic [1:0] s, input bit t,
                                  input logic [N-1:0] a, input logic [N-1:0] b);
    op_t o;
    longint lo, hi;
    o.valid = (s != 2'b00);
    o.tc    = t;
    if (s == 2'b11) begin
      o.addend = val(a, t, N) * val(b, t, N);
      o.prod   = (2*N)'(o.addend);
    end else begin
      lo = val(a[H-1:0], t, H) * val(b[H-1:0], t, H);
      hi = val(a[N-1:H], t, H) * val(b[N-1:H], t, H);
      o.prod   = {N'(hi), N'(lo)};
      o.addend = lo + hi;
    end
    if (!o.valid) begin o.addend = 0; o.prod = '0; end
    return o;
  endfunction

  // One clock cycle: check the outputs after the edge, then apply new inputs.
  task automatic step(input logic [1:0] s, input bit t, input logic [N-1:0] a, input logic [N-1:0] b);
    op_t o, d;
    longint sum, aext, sext;
    logic [ACC_W-1:0] exp_res;
    bit exp_ovf;
    @(posedge clk); #1;
    if (!in_reset && hist.size() >= 3) begin
      d = hist[hist.size() - 3];
      checks++;
      if (acc !== ACC_W'(racc)) begin
        failures++;
        if (failures < 10) $display("%0t acc=%h exp=%h", $time, acc, ACC_W'(racc));
      end
      checks++;
      if (mult_valid !== d.valid) failures++;
      if (d.valid) begin
        sum     = racc + d.addend;
        exp_res = ACC_W'(sum);
        if (d.tc) begin
          aext    = val($unsigned(ACC_W'(racc)), 1, ACC_W);
          sext    = aext + d.addend;
          exp_ovf = (sext > ((longint'(1) << (ACC_W-1)) - 1)) || (sext < -(longint'(1) << (ACC_W-1)));
        end else begin
          exp_ovf = ((racc & ((longint'(1) << ACC_W) - 1)) + d.addend) >= (longint'(1) << ACC_W);
        end
        checks++;
        if (mult_out !== d.prod) begin
          failures++;
          if (failures < 10) $display("%0t mult_out=%h exp=%h", $time, mult_out, d.prod);
        end
        checks++;
        if (result !== exp_res || overflow !== exp_ovf) begin
          failures++;
          if (failures < 10) $display("%0t result=%h ovf=%b exp=%h %b tc=%b racc=%0d add=%0d", $time, result, overflow, exp_res, exp_ovf, d.tc, racc, d.addend);
        end
        if (exp_ovf && overflow) begin
          if (d.tc) n_ovf_s++; else n_ovf_u++;
        end
        racc = longint'(exp_res);
      end else begin
        checks++;
        if (overflow !== 1'b0) failures++;
      end
    end
    sel = s; tc = t; x = a; y = b;
    o = make_op(s, t, a, b);
    hist.push_back(o);
    case (s)
      2'b00:   n_idle++;
      2'b11:   n_full++;
      default: n_twin++;
    endcase
  endtask

  task automatic flush();
    repeat (4) step(2'b00, 0, '0, '0);
  endtask

  task automatic do_reset();
    flush();
    in_reset = 1;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    in_reset = 0;
    racc = 0;
    hist.delete();
    n_reset++;
  endtask

  initial begin
    in_reset = 1;
    racc = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    in_reset = 0;

    // 1. Sum of squares, signed then unsigned.
    for (int k = 1; k <= 9; k++) step(2'b11, 1, N'(k), N'(k));
    flush();
    checks++;
    if (acc !== 32'd285) begin failures++; $display("sum of squares acc=%0d", acc); end
    for (int k = 1; k <= 9; k++) step(2'b11, 0, N'(k), N'(k));
    flush();
    checks++;
    if (acc !== 32'd570) begin failures++; $display("sum of squares (2) acc=%0d", acc); end

    // 4. Reset in the middle of a run.
    do_reset();
    checks++;
    if (acc !== '0) failures++;

    // 2. Random operations.
    for (int k = 0; k < 3000; k++) begin
      if (k % 500 == 0) do_reset();
      step(2'($urandom), 1'($urandom), N'($urandom), N'($urandom));
    end
    flush();

    // 3. Overflow, unsigned then signed.
    do_reset();
    repeat (4) step(2'b11, 0, 16'hFFFF, 16'hFFFF);
    flush();
    do_reset();
    repeat (4) step(2'b11, 1, 16'h8000, 16'h8000);
    repeat (4) step(2'b11, 1, 16'h8000, 16'h7FFF);
    flush();

    checks++; if (n_full == 0)  begin failures++; $display("no full-precision op"); end
    checks++; if (n_twin == 0)  begin failures++; $display("no twin op"); end
    checks++; if (n_idle == 0)  begin failures++; $display("no idle cycle"); end
    checks++; if (n_ovf_u == 0) begin failures++; $display("no unsigned overflow"); end
    checks++; if (n_ovf_s == 0) begin failures++; $display("no signed overflow"); end
    checks++; if (n_reset == 0) begin failures++; $display("no reset"); end
    $display("full=%0d twin=%0d idle=%0d ovf_u=%0d ovf_s=%0d resets=%0d",
             n_full, n_twin, n_idle, n_ovf_u, n_ovf_s, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
