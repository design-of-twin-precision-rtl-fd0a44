// tb_twin_precision_multiplier -- self-checking test of the N = 8
// twin-precision multiplier. Every cycle a random select, signedness and
// operand pair is applied. One cycle after an operation the output must hold:
// the full 16-bit product (sel = 11), or the two 4 x 4 products of the
// operand halves (sel = 01, 10), with valid high; after sel = 00 valid must
// be low and the product must hold. Each mode is counted and must occur.
// A second part sweeps all 8 x 8 operand pairs in full precision, unsigned
// and signed, one per cycle, back to back.
module tb_twin_precision_multiplier;
  localparam int N = 8, H = N / 2;
  int checks = 0, failures = 0;
  int n_full = 0, n_twin = 0, n_idle = 0, n_signed = 0, n_unsigned = 0;

  logic clk = 0, rst = 1, tc = 0;
  logic [1:0] sel = 0;
  logic [N-1:0] a = 0, b = 0;
  logic [2*N-1:0] p;
  logic full_out, tc_out, valid;

  twin_precision_multiplier #(.N(N)) dut (.clk, .rst, .sel, .tc, .a, .b, .p, .full_out, .tc_out, .valid);

  always #5 clk = ~clk;

  function automatic longint val(input longint u, input bit s, input int w);
    if (s && u[w-1]) return u - (longint'(1) << w);
    return u;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int T = 3000;
  logic [1:0]     h_sel [T];
  logic           h_tc  [T];
  logic [2*N-1:0] h_p   [T];

  initial begin
    logic [2*N-1:0] e;
    e = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < T; t++) begin
      @(posedge clk); #1;
      if (t >= 2) begin
        if (h_sel[t-2] != 2'b00) e = h_p[t-2];
        checks++;
        if (valid !== (h_sel[t-2] != 2'b00)) begin
          failures++;
          if (failures < 10) $display("t=%0d valid=%b sel=%b", t, valid, h_sel[t-2]);
        end
        checks++;
        if (p !== e) begin
          failures++;
          if (failures < 10) $display("t=%0d p=%h exp=%h sel=%b tc=%b", t, p, e, h_sel[t-2], h_tc[t-2]);
        end
        if (h_sel[t-2] != 2'b00) begin
          checks++;
          if (full_out !== (h_sel[t-2] == 2'b11) || tc_out !== h_tc[t-2]) failures++;
        end
      end
      sel = 2'($urandom); tc = 1'($urandom);
      a = N'($urandom); b = N'($urandom);
      if (t < 8) begin sel = 2'b11; tc = t[2]; a = t[0] ? '1 : 8'h80; b = t[1] ? '1 : 8'h80; end
      h_sel[t] = sel; h_tc[t] = tc;
      case (sel)
        2'b00: n_idle++;
        2'b11: n_full++;
        default: n_twin++;
      endcase
      if (sel != 0) begin if (tc) n_signed++; else n_unsigned++; end
      if (sel == 2'b11)
        h_p[t] = (2*N)'(val(a, tc, N) * val(b, tc, N));
      else
        h_p[t] = {N'(val(a[N-1:H], tc, H) * val(b[N-1:H], tc, H)),
                  N'(val(a[H-1:0], tc, H) * val(b[H-1:0], tc, H))};
    end
    // Exhaustive 8 x 8 sweep, full precision, one operation per cycle.
    for (int t = 0; t < 2 * 65536 + 2; t++) begin
      @(posedge clk); #1;
      if (t >= 2) begin
        checks++;
        if (valid !== 1'b1 || p !== h_p[(t-2) % 4]) begin
          failures++;
          if (failures < 10) $display("sweep t=%0d p=%h exp=%h", t, p, h_p[(t-2) % 4]);
        end
      end
      sel = 2'b11;
      tc  = t[16];
      {a, b} = 16'(t);
      h_p[t % 4] = (2*N)'(val(a, tc, N) * val(b, tc, N));
      n_full++;
    end
    checks++; if (n_full == 0) failures++;
    checks++; if (n_twin == 0) failures++;
    checks++; if (n_idle == 0) failures++;
    checks++; if (n_signed == 0 || n_unsigned == 0) failures++;
    $display("full=%0d twin=%0d idle=%0d signed=%0d unsigned=%0d", n_full, n_twin, n_idle, n_signed, n_unsigned);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
