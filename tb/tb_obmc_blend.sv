// tb_obmc_blend: streams all 64 16x1 lines of a 32x32 sub-block with random
// predictions and compares each output pixel with the weighted sum computed
// here from the weight maps; also checks that equal predictions pass through
// unchanged (weights sum to 16), that the centre map is 16 in the middle and
// 8 at the corners, and the one-cycle latency.
module tb_obmc_blend;
  import fruc_pkg::*;
  localparam int SIZE = 32, H = SIZE / 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [4:0] y, x0;
  pix_t p_c [16], p_u [16], p_r [16], p_d [16], p_l [16], p_out [16];
  int checks = 0, failures = 0;

  obmc_blend #(.SIZE(SIZE)) dut (.*);

  function automatic int we(int d);
    if (d >= H) return 0;
    return (4 * (H - d)) / H;
  endfunction

  function automatic int wc(int xx, int yy);
    return 16 - we(yy) - we(SIZE - 1 - yy) - we(xx) - we(SIZE - 1 - xx);
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; y = 0; x0 = 0;
    for (int i = 0; i < 16; i++) begin p_c[i] = 0; p_u[i] = 0; p_r[i] = 0; p_d[i] = 0; p_l[i] = 0; end
    checks++; if (wc(0, 0) != 8 || wc(15, 15) != 16 || we(0) != 4) failures++;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int pass = 0; pass < 3; pass++)
      for (int ln = 0; ln < 2 * SIZE; ln++) begin
        int exp_v [16];
        @(negedge clk);
        in_valid = 1; y = 5'(ln / 2); x0 = 5'(16 * (ln % 2));
        for (int i = 0; i < 16; i++) begin
          int xx;
          if (pass == 0) begin
            p_c[i] = 8'(ln * 3 + i); p_u[i] = p_c[i]; p_r[i] = p_c[i]; p_d[i] = p_c[i]; p_l[i] = p_c[i];
          end else begin
            p_c[i] = pix_t'($urandom); p_u[i] = pix_t'($urandom); p_r[i] = pix_t'($urandom);
            p_d[i] = pix_t'($urandom); p_l[i] = pix_t'($urandom);
          end
          xx = int'(x0) + i;
          exp_v[i] = (wc(xx, int'(y)) * p_c[i] + we(int'(y)) * p_u[i] + we(SIZE - 1 - int'(y)) * p_d[i] +
                      we(xx) * p_l[i] + we(SIZE - 1 - xx) * p_r[i]) / 16;
          if (pass == 0) exp_v[i] = p_c[i];
        end
        @(negedge clk);
        in_valid = 0;
        checks++; if (!out_valid) failures++;
        for (int i = 0; i < 16; i++) begin checks++; if (int'(p_out[i]) != exp_v[i]) failures++; end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
