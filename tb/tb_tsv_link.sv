// tb_tsv_link: sends random flits, with random gaps and back to back, through
// the 4:1 serialized TSV link and checks order, contents, the 4-cycle latency,
// the one-flit-per-4-cycles rate and the number of active bundle cycles. A
// last phase drives the link like a router with an output register, deciding
// on send_ok one cycle before the flit is offered, and checks that every
// offered flit is taken and that the rate stays one flit per 4 cycles.
module tb_tsv_link;
  import noc_pkg::*;
  localparam int unsigned RATIO = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, send_ok, out_valid, active;
  logic [FLIT_W-1:0] in_flit = '0, out_flit;
  logic [FLIT_W/RATIO-1:0] tsv_bus;
  int checks = 0, failures = 0;
  logic [FLIT_W-1:0] sent [$];
  longint sent_t [$];
  longint cyc = 0;
  int active_cycles = 0, nsent = 0, nrecv = 0;
  longint first_b2b = -1, last_b2b = -1;

  tsv_link #(.FLIT_W(FLIT_W), .RATIO(RATIO)) dut (
    .clk, .rst_n, .in_valid, .in_flit, .in_ready, .send_ok, .out_valid, .out_flit, .active, .tsv_bus
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && active) active_cycles <= active_cycles + 1;
    if (rst_n && in_valid && in_ready) begin
      sent.push_back(in_flit);
      sent_t.push_back(cyc);
      nsent <= nsent + 1;
    end
    if (rst_n && out_valid) begin
      logic [FLIT_W-1:0] e;
      longint t;
      nrecv <= nrecv + 1;
      checks++;
      if (sent.size() == 0) begin
        failures++;
        $display("FAIL: flit out with nothing sent");
      end else begin
        e = sent.pop_front();
        t = sent_t.pop_front();
        if (out_flit != e) begin
          failures++;
          $display("FAIL: got %h exp %h", out_flit, e);
        end
        checks++;
        if (cyc - t != RATIO + 1) begin  // on the output after edge t+RATIO, seen at the next
          failures++;
          $display("FAIL: latency %0d exp %0d", cyc - t, RATIO + 1);
        end
      end
    end
  end

  // Registered sender: a flit is offered in the cycle after send_ok was seen.
  logic reg_mode = 0, reg_full_rate = 0;
  int reg_left = 0;
  longint reg_first = -1, reg_last = -1;
  always @(posedge clk) begin
    if (reg_mode) begin
      if (rst_n && in_valid) begin
        checks++;
        if (!in_ready) begin
          failures++;
          $display("FAIL: flit offered after send_ok was not taken");
        end
        if (reg_first < 0) reg_first = cyc;
        reg_last = cyc;
      end
      if (send_ok && reg_left > 0 && (reg_full_rate || $urandom % 3 == 0)) begin
        in_valid <= 1'b1;
        in_flit  <= {$urandom, $urandom} & {FLIT_W{1'b1}};
        reg_left <= reg_left - 1;
      end else begin
        in_valid <= 1'b0;
      end
    end
  end

  task automatic send(logic [FLIT_W-1:0] f);
    @(negedge clk);
    in_valid = 1;
    in_flit  = f;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1;
    in_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // random gaps
    for (int i = 0; i < 20; i++) begin
      send({$urandom, $urandom} & {FLIT_W{1'b1}});
      repeat ($urandom % 6) @(posedge clk);
    end
    // back to back: 16 flits must take 16*RATIO cycles
    @(negedge clk);
    first_b2b = cyc;
    in_valid = 1;
    for (int i = 0; i < 16; i++) begin
      in_flit = {$urandom, $urandom} & {FLIT_W{1'b1}};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    in_valid = 0;
    last_b2b = cyc;
    repeat (3 * RATIO) @(posedge clk);
    #1;
    checks++;
    if (last_b2b - first_b2b != 16 * RATIO - (RATIO - 1)) begin
      failures++;
      $display("FAIL: 16 back-to-back flits accepted over %0d cycles", last_b2b - first_b2b);
    end
    // registered sender at full rate: 24 flits, one every RATIO cycles
    reg_full_rate = 1;
    reg_left = 24;
    reg_mode = 1;
    wait (reg_left == 0);
    repeat (3 * RATIO) @(posedge clk);
    checks++;
    if (reg_last - reg_first != 23 * RATIO) begin
      failures++;
      $display("FAIL: 24 registered flits taken over %0d cycles", reg_last - reg_first);
    end
    // registered sender with random gaps: 24 more flits
    reg_full_rate = 0;
    reg_left = 24;
    wait (reg_left == 0);
    repeat (3 * RATIO) @(posedge clk);
    checks++;
    if (nrecv != 84 || nsent != 84) begin
      failures++;
      $display("FAIL: sent %0d received %0d", nsent, nrecv);
    end
    checks++;
    if (active_cycles != 84 * RATIO) begin
      failures++;
      $display("FAIL: active cycles %0d exp %0d", active_cycles, 84 * RATIO);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
