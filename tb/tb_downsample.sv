// tb_downsample: random 8x2 pixel groups; each output must be the rounded
// mean of its 2x2 square, one cycle after the input.
module tb_downsample;
  import fruc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  pix_t row0 [8], row1 [8], p_out [4];
  int checks = 0, failures = 0;

  downsample dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0;
    foreach (row0[i]) begin row0[i] = 0; row1[i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      in_valid = 1;
      foreach (row0[i]) begin row0[i] = pix_t'($urandom); row1[i] = pix_t'($urandom); end
      if (n == 0) foreach (row0[i]) begin row0[i] = 255; row1[i] = 255; end
      @(negedge clk);
      in_valid = 0;
      checks++; if (!out_valid) failures++;
      for (int i = 0; i < 4; i++) begin
        int e;
        e = (int'(row0[2*i]) + int'(row0[2*i+1]) + int'(row1[2*i]) + int'(row1[2*i+1]) + 2) / 4;
        checks++; if (int'(p_out[i]) != e) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
