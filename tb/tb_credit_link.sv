// tb_credit_link: self-checking testbench of credit_link at its default of 2 credits.
//
// Directed parts: after reset the sender holds all credits; an idle link passes a flit to
// the receiver in the cycle it is sent; with the receiver always ready the link carries one
// flit per cycle without a gap; with the receiver stalled the sender stops after exactly
// CREDITS flits; a credit comes back so that the sender may send again two edges after the
// receiver took a flit (one edge for the credit wire, one for the counter). A random part
// sends 3000 flits with random sender gaps and receiver stalls. A monitor on every edge
// checks that flits arrive in order and intact and that no more than CREDITS flits are ever
// between the two ends.
module tb_credit_link;
  import hibs_pkg::*;

  localparam int C = 2;      // the module default

  logic  clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  tx_valid = 1'b0, tx_ready;
  flit_t tx_flit = '0;
  logic  rx_valid, rx_ready = 1'b0;
  flit_t rx_flit;

  credit_link dut (
    .clk(clk), .rst_n(rst_n),
    .tx_valid(tx_valid), .tx_ready(tx_ready), .tx_flit(tx_flit),
    .rx_valid(rx_valid), .rx_ready(rx_ready), .rx_flit(rx_flit)
  );

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  function automatic flit_t mk(int n);
    flit_t f;
    f.head = (n % 3) == 0;
    f.tail = (n % 3) == 2;
    f.data = 32'(n) * 32'h9e37_79b1;
    return f;
  endfunction

  // ---------------- monitor ----------------
  flit_t  inflight [$];
  longint cyc = 0;
  int     sent = 0, taken = 0;
  longint send_cyc [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (tx_valid && tx_ready) begin
        inflight.push_back(tx_flit);
        send_cyc.push_back(cyc);
        sent++;
      end
      if (rx_valid && rx_ready) begin
        flit_t exp;
        checks++;
        if (inflight.size() == 0) begin
          failures++;
          $display("FAIL: flit received that was never sent (t=%0t)", $time);
        end else begin
          exp = inflight.pop_front();
          if (rx_flit != exp) begin
            failures++;
            $display("FAIL: flit %0d corrupted or out of order (t=%0t)", taken, $time);
          end
        end
        taken++;
      end
      checks++;
      if (inflight.size() > C) begin
        failures++;
        $display("FAIL: %0d flits between the ends, more than the credits (t=%0t)",
                 inflight.size(), $time);
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_empty();
    int guard = 0;
    while (inflight.size() != 0 && guard < 100) begin
      @(posedge clk);
      #1;
      guard++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- 1: idle link, pass-through ----
    check(tx_ready, "reset: sender holds credits");
    @(negedge clk);
    rx_ready = 1'b1;
    tx_valid = 1'b1;
    tx_flit  = mk(1);
    #1;
    check(rx_valid && rx_flit == mk(1), "idle link: flit reaches the receiver in the same cycle");
    @(negedge clk);
    tx_valid = 1'b0;
    wait_empty();

    // ---- 2: streaming at one flit per cycle ----
    repeat (4) @(negedge clk);
    send_cyc.delete();
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      tx_valid = 1'b1;
      tx_flit  = mk(100 + n);
      #1;
      check(tx_ready, $sformatf("streaming: credit available for flit %0d", n));
    end
    @(negedge clk);
    tx_valid = 1'b0;
    wait_empty();
    check(send_cyc.size() == 20 && send_cyc[19] - send_cyc[0] == 19,
          "streaming: 20 flits in 20 consecutive cycles");

    // ---- 3: stalled receiver stops the sender after CREDITS flits ----
    @(negedge clk);
    rx_ready = 1'b0;
    begin
      int s0;
      s0 = sent;
      tx_valid = 1'b1;
      for (int n = 0; n < 8; n++) begin
        tx_flit = mk(200 + sent - s0);
        @(negedge clk);
        if (!tx_ready) break;
      end
      repeat (3) @(negedge clk);
      check(sent - s0 == C, $sformatf("stall: exactly %0d flits sent (%0d)", C, sent - s0));
      check(!tx_ready, "stall: no credit left");
      // the receiver takes one flit; the credit is usable two edges later
      rx_ready = 1'b1;
      tx_valid = 1'b0;
      @(negedge clk);
      rx_ready = 1'b0;
      check(!tx_ready, "credit return: not yet after the taking edge");
      @(negedge clk);
      check(tx_ready, "credit return: credit back after the next edge");
      rx_ready = 1'b1;
      wait_empty();
      check(taken == sent, "stall: all flits delivered after the stall");
    end

    // ---- 4: random ----
    begin
      int s0;
      s0 = sent;
      fork
        forever begin
          @(negedge clk);
          rx_ready = ($urandom % 3) != 0;
        end
      join_none
      while (sent - s0 < 3000) begin
        @(negedge clk);
        tx_valid = ($urandom % 4) != 0;
        tx_flit  = mk(1000 + sent - s0);
      end
      @(negedge clk);
      tx_valid = 1'b0;
      disable fork;
      rx_ready = 1'b1;
      wait_empty();
      check(taken == sent, $sformatf("random: all %0d flits delivered", sent));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
