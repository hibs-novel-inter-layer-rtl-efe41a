// tb_bisync_fifo: self-checking testbench of the dual-clock FIFO at its default size (8 words).
//
// The write clock runs at 10 ns and the read clock at 7 ns, two unrelated periods. The test
// first fills the FIFO with the reader stopped and checks that exactly DEPTH words are
// taken, that the write-side count follows and that the congestion flag rises at 80 % of the
// depth (7 of 8 words). It then streams 2000 random words with random stalls on both sides and
// checks that they come out complete and in order.
module tb_bisync_fifo;

  localparam int W = 34;
  localparam int D = 8;

  logic wclk = 1'b0, rclk = 1'b0;
  logic wrst_n = 1'b0, rrst_n = 1'b0;
  always #5   wclk = ~wclk;
  always #3.5 rclk = ~rclk;

  logic         wvalid = 1'b0, wready, w_congested;
  logic [W-1:0] wdata = '0;
  logic [3:0]   wcount;
  logic         rvalid, rready = 1'b0;
  logic [W-1:0] rdata;

  bisync_fifo dut (
    .wclk(wclk), .wrst_n(wrst_n), .wvalid(wvalid), .wready(wready), .wdata(wdata),
    .wcount(wcount), .w_congested(w_congested),
    .rclk(rclk), .rrst_n(rrst_n), .rvalid(rvalid), .rready(rready), .rdata(rdata)
  );

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  logic [W-1:0] expq[$];
  int           nread = 0;

  always @(posedge rclk) if (rrst_n && rvalid && rready) begin
    checks++;
    if (expq.size() == 0 || rdata != expq[0]) begin
      failures++;
      $display("FAIL: read word %0d wrong (t=%0t)", nread, $time);
    end
    if (expq.size() != 0) void'(expq.pop_front());
    nread++;
  end

  task automatic push(logic [W-1:0] d);
    @(negedge wclk);
    wvalid = 1'b1;
    wdata  = d;
    #0.1;
    while (!wready) begin
      @(negedge wclk);
      #0.1;
    end
    @(posedge wclk);
    expq.push_back(d);
    #0.1 wvalid = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int accepted;
    repeat (4) @(posedge wclk);
    wrst_n = 1'b1;
    rrst_n = 1'b1;

    // fill with the reader stopped
    accepted = 0;
    for (int i = 0; i < D + 3; i++) begin
      @(negedge wclk);
      wvalid = 1'b1;
      wdata  = W'(i + 1);
      #0.1;
      if (wready) begin
        @(posedge wclk);
        expq.push_back(W'(i + 1));
        accepted++;
        #0.1;
        check(32'(wcount) == accepted, "fill: write-side count follows");
        check(w_congested == (accepted >= 7), "fill: congestion at 7 of 8 words");
      end
    end
    wvalid = 1'b0;
    check(accepted == D, "fill: exactly DEPTH words taken when full");
    check(!wready, "fill: not ready when full");

    // drain and stream
    fork
      forever begin
        @(negedge rclk);
        rready = ($urandom % 3) != 0;
      end
    join_none
    for (int i = 0; i < 2000; i++) begin
      logic [W-1:0] d;
      d = {$urandom, 2'($urandom)};
      if (($urandom % 4) == 0) repeat ($urandom % 3) @(negedge wclk);
      push(d);
    end
    repeat (60) @(posedge rclk);
    check(nread == D + 2000, $sformatf("stream: all words read (%0d)", nread));
    check(expq.size() == 0, "stream: nothing left");
    check(!rvalid, "stream: empty at the end");
    disable fork;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
