// tb_select_logic: drives Out1 as a 1.6 GHz square and Div as the retimed
// divider output (rising a couple of stage delays after an Out1 fall, once
// every N cycles), and checks Sel against an independent event model: Sel is
// high exactly during the first complete Out1-high phase after each Div rise,
// never otherwise, and never while mode is low. Also checks Sel_n = ~Sel and
// a Div edge that lands while Out1 is already high.
module tb_select_logic;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic out1 = 0, div = 0, mode = 0;
  logic sel, sel_n;
  logic armed_m = 0;     // reference model
  int   pulses = 0, div_edges = 0;

  select_logic dut (.out1(out1), .out1_n(~out1), .div(div), .mode(mode),
                    .sel(sel), .sel_n(sel_n));

  localparam realtime HALF = 312.5;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b exp %b", what, $realtime, got, exp);
    end
  endtask

  // model: armed by rising Div (when mode), cleared after the Out1 fall
  always @(posedge div) if (mode) armed_m = 1;
  always @(negedge out1) begin #1; armed_m = 0; end
  always @(posedge sel) pulses++;

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // out1 square
  initial forever begin #(HALF); out1 = ~out1; end

  // sample Sel in the middle of every half period
  initial begin
    #(HALF/2);
    forever begin
      check(sel, out1 & armed_m & mode, "sel");
      check(sel_n, ~sel, "sel_n");
      #(HALF);
    end
  end

  initial begin
    // mode low: Div edges must not produce Sel
    repeat (3) begin
      @(negedge out1); #125; div = 1; #(8*HALF); div = 0; #(16*HALF);
    end
    checks++; if (pulses != 0) begin failures++; $display("FAIL sel with mode=0"); end
    mode = 1;
    repeat (20) begin
      @(negedge out1); #125; div = 1; div_edges++;
      #(16*HALF); div = 0; #(48*HALF);
    end
    // Div rising while Out1 is high: Sel rises at once, falls with Out1
    @(posedge out1); #100; div = 1; div_edges++;
    #1; check(sel, 1'b1, "sel immediate");
    @(negedge out1); #1; check(sel, 1'b0, "sel falls with out1");
    #(8*HALF); div = 0; #(8*HALF);
    checks++;
    if (pulses != div_edges) begin
      failures++; $display("FAIL pulses %0d edges %0d", pulses, div_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
