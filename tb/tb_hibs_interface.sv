// tb_hibs_interface: self-checking testbench of the layer interface (two bi-synchronous FIFOs).
//
// Bus clock 10 ns, router clock 13 ns. With the router not reading, flits written by the bus
// side fill the receive FIFO and SH_Status must rise at 7 of 8 flits and fall again once the
// router drains it. Then 500 random flits go each way at once, with random stalls on all four
// sides, and must arrive complete and in order.
module tb_hibs_interface;
  import hibs_pkg::*;

  logic clk_bus = 1'b0, clk_layer = 1'b0;
  logic rst_bus_n = 1'b0, rst_layer_n = 1'b0;
  always #5   clk_bus   = ~clk_bus;
  always #6.5 clk_layer = ~clk_layer;

  logic  inj_valid, inj_ready = 1'b0;
  flit_t inj_flit;
  logic  ej_valid = 1'b0, ej_ready;
  flit_t ej_flit = '0;
  logic  sh_status;
  logic  r_tx_valid = 1'b0, r_tx_ready;
  flit_t r_tx_flit = '0;
  logic  r_rx_valid, r_rx_ready = 1'b0;
  flit_t r_rx_flit;

  hibs_interface dut (
    .clk_bus(clk_bus), .rst_bus_n(rst_bus_n),
    .inj_valid(inj_valid), .inj_ready(inj_ready), .inj_flit(inj_flit),
    .ej_valid(ej_valid), .ej_ready(ej_ready), .ej_flit(ej_flit), .sh_status_o(sh_status),
    .clk_layer(clk_layer), .rst_layer_n(rst_layer_n),
    .r_tx_valid(r_tx_valid), .r_tx_ready(r_tx_ready), .r_tx_flit(r_tx_flit),
    .r_rx_valid(r_rx_valid), .r_rx_ready(r_rx_ready), .r_rx_flit(r_rx_flit)
  );

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  flit_t txq[$], rxq[$];
  int    ntx = 0, nrx = 0;

  always @(posedge clk_bus) if (rst_bus_n && inj_valid && inj_ready) begin
    check(txq.size() != 0 && inj_flit == txq[0], "router->bus flit in order");
    if (txq.size() != 0) void'(txq.pop_front());
    ntx++;
  end
  always @(posedge clk_layer) if (rst_layer_n && r_rx_valid && r_rx_ready) begin
    check(rxq.size() != 0 && r_rx_flit == rxq[0], "bus->router flit in order");
    if (rxq.size() != 0) void'(rxq.pop_front());
    nrx++;
  end

  function automatic flit_t rnd_flit();
    flit_t f;
    f = {2'($urandom), $urandom};
    return f;
  endfunction

  task automatic bus_put(flit_t f);
    @(negedge clk_bus);
    ej_valid = 1'b1;
    ej_flit  = f;
    #0.1;
    while (!ej_ready) begin
      @(negedge clk_bus);
      #0.1;
    end
    @(posedge clk_bus);
    rxq.push_back(f);
    #0.1 ej_valid = 1'b0;
  endtask

  task automatic router_put(flit_t f);
    @(negedge clk_layer);
    r_tx_valid = 1'b1;
    r_tx_flit  = f;
    #0.1;
    while (!r_tx_ready) begin
      @(negedge clk_layer);
      #0.1;
    end
    @(posedge clk_layer);
    txq.push_back(f);
    #0.1 r_tx_valid = 1'b0;
  endtask

  initial begin
    repeat (100000) @(posedge clk_bus);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk_layer);
    rst_bus_n = 1'b1;
    rst_layer_n = 1'b1;
    repeat (2) @(posedge clk_bus);

    // SH_Status follows the receive FIFO
    for (int i = 0; i < 8; i++) begin
      bus_put(rnd_flit());
      #0.1;
      check(sh_status == (i + 1 >= 7), $sformatf("SH_Status with %0d flits", i + 1));
    end
    check(!ej_ready, "receive FIFO full");
    @(negedge clk_layer);
    r_rx_ready = 1'b1;
    repeat (12) @(posedge clk_layer);
    repeat (4) @(posedge clk_bus);
    #0.1;
    check(!sh_status && nrx == 8, "SH_Status falls after the router drained the FIFO");

    // both directions at once
    fork
      forever begin
        @(negedge clk_bus);
        inj_ready = ($urandom % 3) != 0;
      end
      forever begin
        @(negedge clk_layer);
        r_rx_ready = ($urandom % 3) != 0;
      end
    join_none
    fork
      for (int i = 0; i < 500; i++) bus_put(rnd_flit());
      for (int i = 0; i < 500; i++) router_put(rnd_flit());
    join
    repeat (40) @(posedge clk_layer);
    check(ntx == 500 && nrx == 508, $sformatf("all flits crossed (%0d, %0d)", ntx, nrx));
    disable fork;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
