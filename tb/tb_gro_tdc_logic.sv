// tb_gro_tdc_logic: a testbench-side ring generator toggles the 15 phases in
// ring order at a random rate while the block's Enable is high. For each
// window (Ref rises, In rises later, both fall) the register must hold the
// number of phase transitions generated, Enable must follow the SR-latch
// rule (set by Ref, cleared by In, In dominant), and the counters must start
// from zero in every window.
module tb_gro_tdc_logic;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic rst_n = 1, ref_i = 0, in_i = 0, enable;
  logic [14:0] phase;
  logic [9:0] out;
  int gen = 0, k = 0;
  realtime step = 45.0;

  gro_tdc_logic dut (.rst_n(rst_n), .ref_i(ref_i), .in_i(in_i), .phase(phase),
                     .enable(enable), .out(out));

  task automatic chk(input int got, input int exp, input string w);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", w, got, exp); end
  endtask

  initial #1 rst_n = 0;

  initial begin
    for (int i = 0; i < 15; i++) phase[i] = logic'(i % 2);
    forever begin
      #(step);
      if (enable) begin phase[k] = ~phase[k]; k = (k + 1) % 15; gen++; end
    end
  end

  initial begin
    #100000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int g0;
    #500 rst_n = 1;
    #500;
    chk(int'(enable), 0, "enable idle");
    for (int w = 0; w < 200; w++) begin
      step = 20.0 + real'($urandom_range(0, 600)) / 10.0;
      #17;
      g0 = gen;
      ref_i = 1; #1; chk(int'(enable), 1, "enable set");
      #(real'($urandom_range(300, 20000)));
      in_i = 1; #1;
      chk(int'(enable), 0, "enable cleared");
      chk(int'(out), (gen - g0) % 1024, "count");
      #(real'($urandom_range(50, 2000)));
      chk(int'(enable), 0, "In dominant");
      ref_i = 0; #(real'($urandom_range(50, 2000)));
      in_i = 0; #1000;
      chk(int'(enable), 0, "hold low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
