// Testbench for sync_fifo, used as a classifier buffer.
//
// Pushes and pops at random rates against a queue model, at the depth of a
// classifier buffer (2048 entries) and with the width of a classified byte.
// Checks the order and contents of every entry, the count, that in_ready
// falls exactly when the FIFO is full, and the one-cycle latency from a push
// into an empty FIFO to out_valid.
module tb_sync_fifo;
  localparam int WIDTH = 40;
  localparam int DEPTH = 2048;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [WIDTH-1:0] in_data = '0, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [WIDTH-1:0] model[$];
  int full_seen = 0;

  task automatic run(int n, int push_pct, int pop_pct);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      check(int'(count) === model.size(), "count");
      check(in_ready === (model.size() < DEPTH), "in_ready is not full");
      check(out_valid === (model.size() !== 0), "out_valid is not empty");
      if (out_valid) check(out_data === model[0], "head data");
      if (model.size() == DEPTH) full_seen++;
      in_valid  = ($urandom_range(0, 99) < push_pct);
      in_data   = {8'($urandom), 32'($urandom)};
      out_ready = ($urandom_range(0, 99) < pop_pct);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // latency from empty
    @(negedge clk);
    in_valid = 1; in_data = 40'h12_3456_789A;
    @(negedge clk);
    in_valid = 0;
    check(out_valid && out_data === 40'h12_3456_789A, "visible one cycle after push");
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
    check(!out_valid, "empty again");
    run(6000, 90, 30);   // fill up
    run(6000, 30, 90);   // drain
    run(6000, 50, 50);
    check(full_seen > 10, "reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
