// tb_sram_sp: writes random words to random addresses of a 48 x 128 bank,
// reads them back in random order and checks data and the one-cycle read
// latency against a model array.
module tb_sram_sp;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, we;
  logic [5:0] addr;
  logic [127:0] wdata, rdata;
  logic [127:0] model [48];
  int checks = 0, failures = 0;

  sram_sp #(.DEPTH(48), .WIDTH(128)) dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 48; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 6'(i);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      model[i] = wdata;
    end
    for (int n = 0; n < 400; n++) begin
      int a;
      a = $urandom % 48;
      @(negedge clk);
      en = 1; addr = 6'(a);
      we = ($urandom % 3 == 0);
      if (we) begin
        wdata = {$urandom, $urandom, $urandom, $urandom};
        model[a] = wdata;
      end else begin
        @(negedge clk);
        en = 0; we = 0;
        checks++;
        if (rdata !== model[a]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
