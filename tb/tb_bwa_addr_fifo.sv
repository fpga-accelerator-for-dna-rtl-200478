// tb_bwa_addr_fifo: checks the dual-stream clock-crossing address FIFO.
//
// Write clock period 25, read clock period 10 (the 80 MHz / 200 MHz ratio).
// Phase 1: random pairs with one or two valid halves and random read stalls;
// every valid entry must come out once, in order (half 0 before half 1).
// Phase 2: reader stopped until the FIFO reports full, then drained.
// Phase 3: rate check, two valid addresses every write cycle with the reader
// always ready: the FIFO must never be full, so two addresses per slow cycle
// get through.
module tb_bwa_addr_fifo;
  localparam int unsigned W = 37;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, wr_full, rd_valid, rd_ready = 0;
  logic [1:0] wr_valid = '0;
  logic [1:0][W-1:0] wr_data;
  logic [W-1:0] rd_data;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0;
  int phase = 1;
  int full_seen = 0, stall_p3 = 0, got = 0;

  bwa_addr_fifo #(.W(W), .DEPTH(16)) dut (.*);

  always #12.5 wclk = ~wclk;
  always #5    rclk = ~rclk;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // reader
  always @(posedge rclk) begin
    if (rd_valid && rd_ready) begin
      got++;
      check(model.size() > 0, "entry expected");
      if (model.size() > 0) check(rd_data == model.pop_front(), "entry order and value");
    end
  end
  always @(negedge rclk)
    rd_ready <= (phase == 1) ? ($urandom_range(0, 3) != 0) : (phase == 2 ? 1'b0 : 1'b1);

  initial begin
    #1;
    #50 wrst_n = 1; rrst_n = 1;
    // phase 1
    for (int t = 0; t < 3000; t++) begin
      @(negedge wclk);
      wr_valid = 2'($urandom_range(0, 3));
      wr_en    = (wr_valid != 0);
      wr_data  = {W'($urandom), W'($urandom)};
      @(posedge wclk);
      if (wr_en && !wr_full) begin
        if (wr_valid[0]) model.push_back(wr_data[0]);
        if (wr_valid[1]) model.push_back(wr_data[1]);
      end
    end
    // phase 2: reader stopped
    @(negedge wclk) begin wr_en = 0; phase = 2; end
    repeat (10) @(negedge wclk);
    for (int t = 0; t < 40; t++) begin
      @(negedge wclk);
      wr_valid = 2'b11; wr_en = 1;
      wr_data  = {W'($urandom), W'($urandom)};
      @(posedge wclk);
      if (wr_full) full_seen++;
      else begin model.push_back(wr_data[0]); model.push_back(wr_data[1]); end
    end
    check(full_seen > 0, "full reported when reader stops");
    @(negedge wclk) begin wr_en = 0; phase = 3; end
    repeat (40) @(negedge wclk);
    check(model.size() == 0, "drained");
    // phase 3: rate
    for (int t = 0; t < 400; t++) begin
      @(negedge wclk);
      wr_valid = 2'b11; wr_en = 1;
      wr_data  = {W'($urandom), W'($urandom)};
      @(posedge wclk);
      if (wr_full) stall_p3++;
      else begin model.push_back(wr_data[0]); model.push_back(wr_data[1]); end
    end
    @(negedge wclk) wr_en = 0;
    repeat (20) @(negedge wclk);
    check(stall_p3 == 0, $sformatf("no full stalls at two addresses per slow cycle (%0d)", stall_p3));
    check(model.size() == 0, "all delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
