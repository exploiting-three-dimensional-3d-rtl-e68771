// Random left/right MB rows and every shift 0..N: each output pixel must be
// left[p + x_off] or right[p + x_off - N].
module tb_row_combiner;
  localparam int N = 16, D = 8;
  logic [N*D-1:0] l, r, o;
  logic [4:0] x_off;
  int checks = 0, failures = 0;

  row_combiner #(.N(N), .D(D)) dut (.left_row(l), .right_row(r), .x_off(x_off), .cand_row(o));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [D-1:0] exp_pix;
    for (int t = 0; t < 400; t++) begin
      for (int p = 0; p < N; p++) begin
        l[p*D +: D] = D'($urandom);
        r[p*D +: D] = D'($urandom);
      end
      x_off = 5'(t % (N + 1));
      #1;
      for (int p = 0; p < N; p++) begin
        exp_pix = (p + int'(x_off) < N) ? l[(p + int'(x_off))*D +: D] : r[(p + int'(x_off) - N)*D +: D];
        checks++;
        if (o[p*D +: D] !== exp_pix) begin
          failures++;
          if (failures < 10) $display("x_off=%0d pixel %0d: %h expected %h", x_off, p, o[p*D +: D], exp_pix);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
