// tb_tsv_util_counter: checks the TSV utilization counter against a
// reference count of random activity, its clear input and its saturation.
// A 4-bit instance is used so that saturation is reached quickly.
module tb_tsv_util_counter;
  localparam int unsigned W = 4;
  logic clk = 0, rst_n = 0, clear = 0, active = 0;
  logic [W-1:0] count, cycles;
  int checks = 0, failures = 0;
  int exp_count = 0, exp_cycles = 0;

  tsv_util_counter #(.WIDTH(W)) dut (.clk, .rst_n, .clear, .active, .count, .cycles);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (count != W'(exp_count) || cycles != W'(exp_cycles)) begin
      failures++;
      $display("FAIL %s: count=%0d exp %0d cycles=%0d exp %0d", what, count, exp_count,
               cycles, exp_cycles);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // random activity, short enough not to saturate
    for (int i = 0; i < 12; i++) begin
      active = ($urandom % 2) == 1;
      @(posedge clk);
      #1;
      exp_cycles++;
      if (active) exp_count++;
      check("count");
      @(negedge clk);
    end
    // clear
    clear = 1;
    @(posedge clk);
    #1;
    clear = 0;
    exp_count = 0;
    exp_cycles = 0;
    check("clear");
    // saturation: busy every cycle for longer than 2^W cycles
    @(negedge clk);
    active = 1;
    for (int i = 0; i < 24; i++) begin
      @(posedge clk);
      #1;
      if (exp_count < (1 << W) - 1) exp_count++;
      if (exp_cycles < (1 << W) - 1) exp_cycles++;
      check("saturate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
