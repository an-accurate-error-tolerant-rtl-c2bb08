// tb_rx_fifo: random push/pop traffic against a queue model. Checks data
// order, count, empty, and that push_ready drops exactly when the FIFO holds
// DEPTH bytes (a refused push is not stored). Pops are only issued when not
// empty, as the tile does.
// Runs at a reduced depth of 16 (the tile uses 256).
module tb_rx_fifo;
  localparam int D = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, push_valid = 0, pop = 0, push_ready, empty;
  logic [7:0] din, dout;
  logic [4:0] count;
  always #1 clk = ~clk;

  rx_fifo #(.DEPTH(D)) dut (.clk, .rst_n, .push_valid, .push_ready, .din, .pop, .dout, .empty, .count);

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 8) $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mq [$];
  initial begin
    int full_seen = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int bias;
      @(negedge clk);
      chk(int'(count) == mq.size(), "count");
      chk(empty == (mq.size() == 0), "empty");
      chk(push_ready == (mq.size() < D), "push_ready");
      if (mq.size() > 0) chk(int'(dout) == mq[0], $sformatf("data order: %0d vs %0d", dout, mq[0]));
      if (mq.size() == D) full_seen++;
      bias = (t / 500) % 2 == 0 ? 3 : 1;   // alternate filling and draining phases
      push_valid = ($urandom_range(3) < bias);
      din = 8'($urandom);
      pop = !empty && ($urandom_range(3) >= bias);
    end
    chk(full_seen > 0, "FIFO reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, updated on the same edge as the design
  always @(posedge clk) if (rst_n) begin
    if (pop && !empty) void'(mq.pop_front());
    if (push_valid && push_ready) mq.push_back(int'(din));
  end
endmodule
