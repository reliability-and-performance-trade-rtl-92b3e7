// tb_vc_input_buffer: random writes into the 4 virtual channels (never more
// than a channel holds, as credit flow control guarantees) and random reads,
// checked against one reference queue per channel.
module tb_vc_input_buffer;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic  in_valid = 0;
  flit_t in_flit = '0;
  flit_t front [NUM_VC];
  logic [NUM_VC-1:0] front_valid, deq = '0, full;
  int checks = 0, failures = 0;
  flit_t model [NUM_VC][$];
  int writes = 0, reads = 0, both = 0;

  vc_input_buffer #(.VCS(NUM_VC), .DEPTH(BUF_DEPTH)) dut (
    .clk, .rst_n, .in_valid, .in_flit, .front, .front_valid, .deq, .full
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      // compare the visible state with the model
      for (int v = 0; v < NUM_VC; v++) begin
        checks++;
        if (front_valid[v] != (model[v].size() != 0) ||
            full[v] != (model[v].size() == BUF_DEPTH) ||
            (model[v].size() != 0 && front[v] != model[v][0])) begin
          failures++;
          $display("FAIL cycle %0d vc %0d: valid=%b full=%b front=%h model size %0d", c, v,
                   front_valid[v], full[v], front[v], model[v].size());
        end
      end
      // choose this cycle's reads and write
      for (int v = 0; v < NUM_VC; v++) deq[v] = front_valid[v] && ($urandom % 3 == 0);
      in_valid = ($urandom % 2) == 1;
      in_flit.vc    = VC_W'($urandom);
      in_flit.ftype = flit_type_e'($urandom);
      in_flit.data  = $urandom;
      if (model[in_flit.vc].size() == BUF_DEPTH && !deq[in_flit.vc]) in_valid = 0;
      @(posedge clk);
      for (int v = 0; v < NUM_VC; v++) begin
        if (deq[v]) begin
          void'(model[v].pop_front());
          reads++;
        end
      end
      if (in_valid) begin
        model[in_flit.vc].push_back(in_flit);
        writes++;
        if (deq[in_flit.vc]) both++;
      end
    end
    checks++;
    if (writes < 500 || reads < 500 || both == 0) begin
      failures++;
      $display("FAIL: too little traffic: %0d writes %0d reads %0d same-cycle", writes, reads,
               both);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
