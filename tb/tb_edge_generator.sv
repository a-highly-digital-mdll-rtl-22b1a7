// tb_edge_generator: drives random div_raw/div2x_raw between clock edges and
// checks the retimed outputs against a history of the inputs: div and en are
// the inputs two clocks late, div2x one clock late, dis three clocks late
// (i.e. en one clock late, so rising en to rising dis is one period).
module tb_edge_generator;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, div_raw = 0, div2x_raw = 0;
  logic div, div2x, en, dis;
  logic [3:0] hd = '0, hx = '0;   // input history, [0] = latest sampled

  edge_generator dut (.clk(clk), .rst_n(rst_n), .div_raw(div_raw),
                      .div2x_raw(div2x_raw), .div(div), .div2x(div2x),
                      .en(en), .dis(dis));

  always #312.5 clk = ~clk;

  task automatic chk(input logic got, input logic exp, input string w);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s at %0t", w, $realtime); end
  endtask

  initial #1 rst_n = 0;

  initial begin
    #2000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1000 rst_n = 1;
    repeat (500) begin
      @(posedge clk);
      hd = {hd[2:0], div_raw};
      hx = {hx[2:0], div2x_raw};
      #100;
      chk(div,   hd[1], "div");
      chk(div2x, hx[0], "div2x");
      chk(en,    hx[1], "en");
      chk(dis,   hx[2], "dis");
      @(negedge clk);
      div_raw   = 1'($urandom);
      div2x_raw = 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
