// tb_frame_sum8x8: streams two whole 1920x1080 frames of generated pixels
// (a hash of position and frame number) through the 8x8 sum unit at its
// default size, with random idle cycles between segments, and checks every
// output: its grid position, its six sums against sums worked out from the
// pixel formula, that it leaves exactly one cycle after the eighth line's
// segment, that every cell of the frame appears once and that frame_done
// marks the last one.
module tb_frame_sum8x8;
  import fruc_pkg::*;
  localparam int SEGS = 40, LINES = 1080;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic frame_start, in_valid, out_valid, frame_done;
  pix_t seg [48];
  sum64_t out_sums [6];
  logic [8:0] out_gx;
  logic [7:0] out_gy;
  int checks = 0, failures = 0;
  int frame = 0, n_out = 0, n_done = 0, exp_gx = -1, exp_gy = -1;

  frame_sum8x8 dut (.*);

  initial begin
    #20000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int pix(int x, int y, int f);
    return ((x * 37 + y * 91 + f * 53) ^ (x * y + 7 * f)) & 255;
  endfunction

  function automatic int cell_sum(int gx, int gy, int f);
    int s;
    s = 0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) s += pix(8 * gx + c, 8 * gy + r, f);
    return s;
  endfunction

  // output checker: at each rising edge the outputs registered on the edge
  // before are compared with the segment that edge took (exp_gx < 0: none)
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid != (exp_gx >= 0)) begin
        failures++;
        $display("out_valid %0d, expected %0d", out_valid, exp_gx >= 0);
      end
      if (out_valid && exp_gx >= 0) begin
        n_out++;
        checks++;
        if (int'(out_gx) != exp_gx || int'(out_gy) != exp_gy) begin
          failures++;
          $display("position (%0d,%0d), expected (%0d,%0d)", out_gx, out_gy, exp_gx, exp_gy);
        end
        for (int i = 0; i < 6; i++) begin
          checks++;
          if (int'(out_sums[i]) != cell_sum(exp_gx + i, exp_gy, frame)) failures++;
        end
        if (frame_done) n_done++;
        checks++;
        if (frame_done != (exp_gx == 6 * (SEGS - 1) && exp_gy == LINES / 8 - 1)) failures++;
      end
      exp_gx = -1; exp_gy = -1;
    end
  end

  task automatic send_frame();
    @(negedge clk) frame_start = 1;
    @(negedge clk) frame_start = 0;
    for (int y = 0; y < LINES; y++)
      for (int s = 0; s < SEGS; s++) begin
        if ($urandom % 8 == 0) @(negedge clk);
        for (int i = 0; i < 48; i++) seg[i] = pix_t'(pix(48 * s + i, y, frame));
        in_valid = 1;
        @(posedge clk);
        #1 in_valid = 0;
        if (y % 8 == 7) begin exp_gx = 6 * s; exp_gy = y / 8; end
        @(negedge clk);
      end
  endtask

  initial begin
    frame_start = 0; in_valid = 0;
    foreach (seg[i]) seg[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      repeat (2) @(negedge clk);
      frame = f;
      send_frame();
    end
    @(negedge clk);
    checks++; if (n_out != 2 * SEGS * LINES / 8) failures++;
    checks++; if (n_done != 2) failures++;
    $display("cells %0d, frames done %0d", 6 * n_out, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
