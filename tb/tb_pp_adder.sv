// tb_pp_adder -- self-checking test of the sub-product adder (N = 8).
// For random operands the four N/2 x N/2 sub-products are worked out in the
// testbench; the full-mode result must equal the N x N product, the twin-mode
// result the two low/high-half products side by side.
module tb_pp_adder;
  localparam int N = 8, H = N / 2;
  int checks = 0, failures = 0;

  logic full, tc;
  logic [N-1:0] ll, lh, hl, hh;
  logic [2*N-1:0] p;
  pp_adder #(.N(N)) dut (.full, .tc, .ll, .lh, .hl, .hh, .p);

  function automatic longint val(input longint u, input bit s, input int w);
    if (s && u[w-1]) return u - (longint'(1) << w);
    return u;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] a, b;
    longint al, ah, bl, bh, exp;
    for (int k = 0; k < 3000; k++) begin
      a = N'($urandom); b = N'($urandom);
      tc = 1'($urandom); full = 1'($urandom);
      if (k < 8) begin a = k[0] ? '1 : {1'b1, {(N-1){1'b0}}}; b = k[1] ? '1 : {1'b1, {(N-1){1'b0}}}; tc = k[2]; full = 1; end
      if (full) begin
        al = a[H-1:0]; bl = b[H-1:0];
        ah = val(a[N-1:H], tc, H); bh = val(b[N-1:H], tc, H);
      end else begin
        al = val(a[H-1:0], tc, H); bl = val(b[H-1:0], tc, H);
        ah = val(a[N-1:H], tc, H); bh = val(b[N-1:H], tc, H);
      end
      ll = N'(al * bl); lh = N'(al * bh); hl = N'(ah * bl); hh = N'(ah * bh);
      #1;
      if (full) exp = val(a, tc, N) * val(b, tc, N);
      else      exp = {N'(ah * bh), N'(al * bl)};
      checks++;
      if (p !== (2*N)'(exp)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h tc=%b full=%b p=%h exp=%h", a, b, tc, full, p, (2*N)'(exp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
