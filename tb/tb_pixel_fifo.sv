// Self-checking test of pixel_fifo against a queue model: random loads,
// pops and clears; entries and count must match the model every clock.
module tb_pixel_fifo;
  localparam int DEPTH = 8, W = 4;
  logic clk = 0, rst_n = 0, clear = 0, load = 0, pop = 0;
  logic [DEPTH-1:0][W-1:0] load_data = '0, entries;
  logic [3:0] count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0;

  pixel_fifo #(.DEPTH(DEPTH), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      clear = ($urandom % 40 == 0); load = ($urandom % 6 == 0); pop = 1'($urandom);
      for (int k = 0; k < DEPTH; k++) load_data[k] = W'($urandom);
      @(posedge clk);
      if (clear) q.delete();
      else if (load) begin q.delete(); for (int k = 0; k < DEPTH; k++) q.push_back(load_data[k]); end
      else if (pop && q.size() > 0) void'(q.pop_front());
      #1;
      checks++;
      if (int'(count) != q.size()) begin failures++; $display("count %0d %0d", count, q.size()); end
      for (int k = 0; k < q.size(); k++) begin
        checks++;
        if (entries[k] !== q[k]) begin failures++; $display("entry %0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
