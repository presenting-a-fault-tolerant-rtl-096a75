// tb_vc_fifo: random push/pop traffic against a queue model. Checks the
// head word, empty/full flags every cycle, that a push into an empty
// buffer is readable one cycle later, and that push+pop on a full buffer
// keeps it full.
module tb_vc_fifo;
  localparam int W = 8, D = 4;

  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic empty, full;
  int checks = 0, failures = 0;
  int full_pushpop = 0;
  logic [W-1:0] q[$];

  vc_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(empty && !full, "empty after reset");
    // latency: word pushed at an edge is the head right after it
    push = 1; wdata = 8'hA5;
    @(negedge clk);
    push = 0;
    chk(!empty && rdata == 8'hA5, "one-cycle write-to-read");
    q.push_back(8'hA5);
    for (int n = 0; n < 3000; n++) begin
      // drive at negedge, model updates at posedge
      pop   = ($urandom_range(0, 99) < 45) && !empty;
      push  = ($urandom_range(0, 99) < 55) && (!full || pop);
      if (full && $urandom_range(0, 3) == 0) begin push = 1; pop = 1; end
      wdata = 8'($urandom);
      if (full && push && pop) full_pushpop++;
      @(posedge clk);
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push) q.push_back(wdata);
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty flag");
      chk(full == (q.size() == D), "full flag");
      if (q.size() > 0) chk(rdata == q[0], "head word");
    end
    chk(full_pushpop > 0, "push+pop while full exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
