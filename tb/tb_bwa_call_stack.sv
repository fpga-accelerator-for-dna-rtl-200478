// tb_bwa_call_stack: checks the pending-call register file against a queue
// model: random pushes and pops, last-in-first-out order, registered pop
// data, full/empty flags, overflow on a push into a full stack, and clear.
module tb_bwa_call_stack;
  import bwa_pkg::*;

  localparam int unsigned DEPTH = 16;

  logic  clk = 0, rst_n = 0;
  logic  clear = 0, push = 0, pop = 0;
  call_t push_data, pop_data;
  logic  empty, full, overflow;

  int checks = 0, failures = 0;
  call_t model [$];

  bwa_call_stack #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t size=%0d empty=%0d full=%0d sp=%0d", what, $time, model.size(), empty, full, dut.sp);
    end
  endtask

  function automatic call_t rand_call();
    call_t c;
    c.i = IDX_W'($urandom); c.z = Z_W'($urandom); c.k = $urandom; c.l = $urandom;
    return c;
  endfunction

  initial begin
    call_t exp_pop;
    bit    popped;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 4000; t++) begin
      // choose an operation; bias towards filling in the first phase
      int r;
      bit do_push;
      r       = $urandom_range(0, 99);
      do_push = (t < 2000) ? (r < 60) : (r < 40);
      @(negedge clk);
      push = 0; pop = 0; popped = 0;
      if (do_push) begin
        push = 1; push_data = rand_call();
      end else if (r < 95) begin
        pop = 1;
      end
      #1;
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      @(posedge clk);
      if (push) begin
        if (model.size() < DEPTH) model.push_back(push_data);
        else begin #1; check(overflow == 1'b1, "overflow set"); end
      end else if (pop && model.size() > 0) begin
        exp_pop = model.pop_back();
        popped  = 1;
      end
      #1;
      push = 0; pop = 0;
      if (popped) check(pop_data == exp_pop, "pop data LIFO");
      if (t == 3000) begin
        @(negedge clk) clear = 1;
        @(posedge clk); #1 clear = 0;
        model.delete();
        check(empty && !overflow, "clear");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
