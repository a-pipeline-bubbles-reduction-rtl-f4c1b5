// token_fifo_tb: self-checking test of token_fifo.
// Random pushes and pops against a queue model; checks head, empty, full
// and count every cycle, fills the queue to full and drains it.
module token_fifo_tb;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  logic [15:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [15:0] model[$];
  int fulls = 0;

  token_fifo #(.T(logic [15:0]), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() != 0) check(dout == model[0], "head");
      if (full) fulls++;
      // phases: fill, drain, random
      if (i < 600) begin
        push = !full && ($urandom_range(0, 3) != 0) && ((i / 50) % 2 == 0);
        pop  = !empty && (((i / 50) % 2 == 1) ? 1'b1 : ($urandom_range(0, 3) == 0));
      end else begin
        push = !full && $urandom_range(0, 1);
        pop  = !empty && $urandom_range(0, 1);
      end
      din = 16'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    check(fulls > 0, "queue reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
