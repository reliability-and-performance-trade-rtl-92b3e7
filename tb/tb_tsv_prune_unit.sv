// tb_tsv_prune_unit: checks the pruning rule (utilization above the region
// mean by more than one standard deviation) against a floating-point
// reference, for random regions, a uniform region and a single hot spot, and
// checks that the flags change 2*N+1 clock edges after the edge that
// samples start.
module tb_tsv_prune_unit;
  localparam int unsigned N  = 16;
  localparam int unsigned UW = 32;
  logic clk = 0, rst_n = 0, start = 0;
  logic [UW-1:0] util [N];
  logic [N-1:0]  pruned;
  logic          busy, done;
  int checks = 0, failures = 0;

  tsv_prune_unit #(.N(N), .UW(UW)) dut (.clk, .rst_n, .start, .util, .pruned, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] ref_flags(logic [UW-1:0] u [N]);
    real mean, var_, sd;
    logic [N-1:0] f;
    mean = 0.0;
    for (int i = 0; i < N; i++) mean += real'(u[i]);
    mean /= N;
    var_ = 0.0;
    for (int i = 0; i < N; i++) var_ += (real'(u[i]) - mean) ** 2;
    var_ /= N;
    sd = var_ ** 0.5;
    for (int i = 0; i < N; i++) f[i] = real'(u[i]) > mean + sd + 1e-6 * (mean + 1.0);
    return f;
  endfunction

  task automatic run_case(string what);
    logic [N-1:0] exp;
    int cyc;
    exp = ref_flags(util);
    @(negedge clk);
    start = 1;
    @(posedge clk);
    #1;
    start = 0;
    cyc = 0;
    while (!done && cyc < 100) begin
      @(posedge clk);
      #1;
      cyc++;
    end
    checks++;
    if (pruned !== exp) begin
      failures++;
      $display("FAIL %s: pruned=%b exp=%b", what, pruned, exp);
    end
    checks++;
    if (cyc != 2 * N + 1) begin
      failures++;
      $display("FAIL %s: latency %0d cycles, exp %0d", what, cyc, 2 * N + 1);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) util[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // uniform: nothing pruned
    for (int i = 0; i < N; i++) util[i] = 1000;
    run_case("uniform");
    // single hot spot
    for (int i = 0; i < N; i++) util[i] = 100 + i;
    util[5] = 5000;
    run_case("hotspot");
    // middle-heavy, as between the second and third layers
    for (int i = 0; i < N; i++) util[i] = (i >= 4 && i < 8) ? 40000 + 37 * i : 9000 + 11 * i;
    run_case("band");
    // large counts, to exercise the full width
    for (int i = 0; i < N; i++) util[i] = 32'hF000_0000 + (i * 32'h0100_0000);
    run_case("wide");
    // random regions
    for (int k = 0; k < 40; k++) begin
      for (int i = 0; i < N; i++) util[i] = $urandom % (k < 20 ? 1000 : 100000000);
      run_case("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
