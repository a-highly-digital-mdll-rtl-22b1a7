// tb_sigma_delta: for a set of 16-bit words, runs 256 clocks and checks that
// the 8-bit codes sum to exactly (word*256 + r0 - r256)/256, i.e. the mean
// is word/256 and only the two neighbouring codes appear; also checks the
// reset code and saturation at the top.
module tb_sigma_delta;
  timeunit 1ps;
  timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic [15:0] word = 16'h8000;
  logic [7:0] code;

  sigma_delta dut (.clk(clk), .rst_n(rst_n), .word(word), .code(code));

  initial #1 rst_n = 0;

  initial begin
    #100000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int sum, lo, hi;
    #100;
    checks++; if (code != 8'h80) begin failures++; $display("FAIL reset code"); end
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      word = (t == 0) ? 16'h1234 : (t == 1) ? 16'hFFFF : (t == 2) ? 16'h0000 : 16'($urandom);
      // settle: one cycle to load, residue from previous word carries
      #500 clk = 1; #500 clk = 0;
      sum = 0;
      for (int k = 0; k < 256; k++) begin
        #500 clk = 1; #10;
        sum += int'(code);
        checks++;
        if (int'(code) != int'(word[15:8]) && !(int'(code) == int'(word[15:8]) + 1)) begin
          failures++; $display("FAIL code %0d word %h", code, word);
        end
        #490 clk = 0;
      end
      // over 256 cycles: sum*256 = 256*word + r_start - r_end, |.| < 256
      checks++;
      if (word[15:8] != 8'hFF && (sum * 256 - 256 * int'(word) > 255 || 256 * int'(word) - sum * 256 > 255)) begin
        failures++; $display("FAIL mean word=%h sum=%0d", word, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
