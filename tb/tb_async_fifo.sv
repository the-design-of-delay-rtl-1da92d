`timescale 1ns / 1ps
// tb_async_fifo - checks the dual-clock FIFO against a reference queue.
//
// Write clock 24 ns (sample rate), read clock 6 ns. Phase 1 fills the FIFO
// without reading: it must accept exactly DEPTH words, then raise wfull;
// one more write must be dropped and set 'overflow'. Phase 2 drains it and
// compares every word in order; rempty must then be set. Phase 3 runs random
// writes and reads together and compares every word read with the queue.
module tb_async_fifo;
  localparam int DW    = 12;
  localparam int DEPTH = 8;

  int checks = 0, failures = 0;

  logic          wclk = 1'b0, rclk = 1'b0;
  logic          rst_n = 1'b1;
  logic          winc = 1'b0, rinc = 1'b0;
  logic [DW-1:0] wdata = '0;
  logic          wfull, overflow, rempty;
  logic [DW-1:0] rdata;

  always #12 wclk = ~wclk;
  always #3  rclk = ~rclk;

  async_fifo #(.DW(DW), .DEPTH(DEPTH)) dut (
    .wclk(wclk), .wrst_n(rst_n), .winc(winc), .wdata(wdata), .wfull(wfull),
    .overflow(overflow), .rclk(rclk), .rrst_n(rst_n), .rinc(rinc),
    .rdata(rdata), .rempty(rempty)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] q [$];
  bit            random_phase = 1'b0;

  // Writer: queue a word for every write the FIFO accepts.
  always @(posedge wclk) begin
    if (winc && !wfull) q.push_back(wdata);
  end

  // Reader: compare every word taken.
  int n_read = 0;
  always @(posedge rclk) begin
    if (rinc && !rempty) begin
      check(q.size() > 0, "read from a FIFO holding data");
      if (q.size() > 0) begin
        logic [DW-1:0] e;
        e = q.pop_front();
        check(rdata == e, $sformatf("read %0d: got %0h expected %0h", n_read, rdata, e));
      end
      n_read++;
    end
  end

  initial begin
    int accepted;
    #1 rst_n = 1'b0;
    #30 rst_n = 1'b1;
    check(rempty == 1'b1 && wfull == 1'b0, "empty after reset");
    // Phase 1: fill.
    accepted = 0;
    for (int n = 0; n < DEPTH + 1; n++) begin
      @(negedge wclk);
      if (!wfull) accepted++;
      winc = 1'b1;
      wdata = DW'($urandom);
    end
    @(negedge wclk);
    check(wfull == 1'b1, "full after DEPTH writes");
    check(accepted == DEPTH, $sformatf("accepted %0d words", accepted));
    check(overflow == 1'b1, "overflow flag after write to full FIFO");
    winc = 1'b0;
    // Phase 2: drain.
    repeat (10) @(negedge rclk);
    rinc = 1'b1;
    repeat (DEPTH + 4) @(negedge rclk);
    rinc = 1'b0;
    check(rempty == 1'b1, "empty after draining");
    check(q.size() == 0, "all words read");
    // Phase 3: random traffic.
    fork
      repeat (400) begin
        @(negedge wclk);
        winc  = ($urandom_range(0, 3) != 0);
        wdata = DW'($urandom);
      end
      repeat (1600) begin
        @(negedge rclk);
        rinc = ($urandom_range(0, 4) == 0);
      end
    join
    winc = 1'b0;
    repeat (10) @(negedge wclk);
    rinc = 1'b1;
    repeat (4 * DEPTH + 10) @(negedge rclk);
    check(q.size() == 0 && rempty, "drained after random traffic");
    check(n_read > 200, $sformatf("enough words through (%0d)", n_read));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
