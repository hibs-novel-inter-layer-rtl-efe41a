// tb_ts_unit: self-checking testbench of ts_unit at its default size (5 flits, next layer 1).
//
// Directed parts check: an 8-flit packet streams through a 5-flit buffer at one flit per
// cycle, one cycle after entering; the congestion flag at 4 of 5 flits; the non-blocking
// choice (an MH packet overtakes an older-in-order SH packet whose path is congested, and
// bypass_o marks it); the age rule (a packet that was passed over wins against a newer one
// that sits in a lower table row). A random part then sends packets of 1 to 8 flits with
// random destinations, random output stalls and random status inputs, and checks that every
// packet leaves exactly once, whole, in order within itself and never interleaved with another.
module tb_ts_unit;
  import hibs_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid = 1'b0, in_ready;
  flit_t in_flit = '0;
  logic  in_src = 1'b0;
  logic  out_valid, out_ready = 1'b0;
  flit_t out_flit;
  logic  sh_status = 1'b0, mh_status = 1'b0;
  logic  congested;
  logic [2:0] occupancy;
  logic  bypass;

  ts_unit dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_flit(in_flit), .in_src(in_src),
    .out_valid(out_valid), .out_ready(out_ready), .out_flit(out_flit),
    .sh_status_i(sh_status), .mh_status_i(mh_status),
    .congested_o(congested), .occupancy_o(occupancy), .bypass_o(bypass)
  );

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  // flit data: layer(3) core(4) packet id(9) sequence(16)
  function automatic flit_t mk(int layer, int pid, int seq, bit head, bit tail);
    flit_t f;
    f.head = head;
    f.tail = tail;
    f.data = {layer[2:0], 4'd0, pid[8:0], seq[15:0]};
    return f;
  endfunction

  longint cyc = 0;
  flit_t  outq[$];
  longint outc[$];
  int     bypass_cnt = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid && out_ready) begin
      outq.push_back(out_flit);
      outc.push_back(cyc);
    end
    if (rst_n && bypass) bypass_cnt++;
  end

  longint in_cyc[$];
  task automatic put(flit_t f);
    @(negedge clk);
    in_valid = 1'b1;
    in_flit  = f;
    #1;
    while (!in_ready) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    in_cyc.push_back(cyc);
    #1 in_valid = 1'b0;
  endtask

  task automatic put_pkt(int layer, int pid, int len);
    for (int s = 0; s < len; s++) put(mk(layer, pid, s, s == 0, s == len - 1));
  endtask

  task automatic wait_out(int n);
    int guard = 0;
    while (outq.size() < n && guard < 200) begin
      @(posedge clk);
      #1;
      guard++;
    end
  endtask

  function automatic int pid_of(flit_t f);
    return int'(f.data[24:16]);
  endfunction

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- 1: streaming, one flit per cycle, one cycle through ----
    out_ready = 1'b1;
    in_cyc.delete();
    put_pkt(1, 1, 8);
    wait_out(8);
    check(outq.size() == 8, "stream: 8 flits out");
    for (int i = 0; i < 8 && i < outq.size(); i++) begin
      check(outq[i] == mk(1, 1, i, i == 0, i == 7), $sformatf("stream: flit %0d intact", i));
      check(outc[i] == in_cyc[i] + 1, $sformatf("stream: flit %0d one cycle through", i));
    end
    outq.delete(); outc.delete();

    // ---- 2: occupancy and congestion threshold (80 % of 5 = 4 flits) ----
    out_ready = 1'b0;
    put_pkt(3, 2, 3);
    #1;
    check(occupancy == 3 && !congested, "threshold: 3 flits not congested");
    put(mk(3, 3, 0, 1, 1));
    #1;
    check(occupancy == 4 && congested, "threshold: 4 flits congested");
    @(negedge clk);
    out_ready = 1'b1;
    wait_out(4);
    check(outq.size() == 4 && pid_of(outq[0]) == 2 && pid_of(outq[3]) == 3,
          "threshold: both packets drained in order");
    outq.delete(); outc.delete();

    // ---- 3: non-blocking choice ----
    @(negedge clk);
    out_ready = 1'b0;
    put_pkt(1, 10, 2);     // SH (next layer is 1), row 0
    put_pkt(3, 11, 2);     // MH, row 1
    @(negedge clk);
    sh_status = 1'b1;      // SH path of the next stage congested
    bypass_cnt = 0;
    out_ready = 1'b1;
    wait_out(4);
    check(outq.size() == 4 && pid_of(outq[0]) == 11 && pid_of(outq[2]) == 10,
          "non-blocking: MH packet overtakes the SH packet on a congested path");
    check(bypass_cnt == 1, "non-blocking: bypass reported once");
    outq.delete(); outc.delete();
    sh_status = 1'b0;

    // without congestion the first packet goes first
    @(negedge clk);
    out_ready = 1'b0;
    put_pkt(1, 12, 2);
    put_pkt(3, 13, 2);
    @(negedge clk);
    bypass_cnt = 0;
    out_ready = 1'b1;
    wait_out(4);
    check(outq.size() == 4 && pid_of(outq[0]) == 12 && pid_of(outq[2]) == 13,
          "no congestion: first packet first");
    check(bypass_cnt == 0, "no congestion: no bypass");
    outq.delete(); outc.delete();

    // ---- 4: ageing ----
    // rows: 0 = X (MH), 1 = Y (SH), 2 = Z (SH). With the SH path congested X leaves first; the
    // SH packets then compete alone (fallback), Y (lower row) wins and Z ages to 1. A new SH
    // packet W takes free row 0 with age 0; Z must still beat W.
    @(negedge clk);
    out_ready = 1'b0;
    put(mk(3, 20, 0, 1, 1));
    put(mk(1, 21, 0, 1, 1));
    put(mk(1, 22, 0, 1, 1));
    @(negedge clk);
    sh_status = 1'b1;
    out_ready = 1'b1;
    wait_out(2);
    @(negedge clk);
    out_ready = 1'b0;
    check(outq.size() == 2 && pid_of(outq[0]) == 20 && pid_of(outq[1]) == 21,
          "ageing: MH first, then lowest SH row");
    put(mk(1, 23, 0, 1, 1));
    @(negedge clk);
    sh_status = 1'b0;
    out_ready = 1'b1;
    wait_out(4);
    check(outq.size() == 4 && pid_of(outq[2]) == 22 && pid_of(outq[3]) == 23,
          "ageing: older packet wins against a lower row");
    outq.delete(); outc.delete();

    // ---- 5: two writers interleave flit by flit; the linked lists keep them apart ----
    @(negedge clk);
    out_ready = 1'b0;
    for (int s = 0; s < 2; s++) begin
      in_src = 1'b0;
      put(mk(3, 30, s, s == 0, s == 1));
      in_src = 1'b1;
      put(mk(1, 31, s, s == 0, s == 1));
    end
    in_src = 1'b0;
    @(negedge clk);
    out_ready = 1'b1;
    wait_out(4);
    check(outq.size() == 4 && outq[0] == mk(3, 30, 0, 1, 0) && outq[1] == mk(3, 30, 1, 0, 1) &&
          outq[2] == mk(1, 31, 0, 1, 0) && outq[3] == mk(1, 31, 1, 0, 1),
          "interleaved writes leave as two whole packets");
    outq.delete(); outc.delete();

    // ---- 6: the slot reserved for the packet that owns the output ----
    // writer 0 starts a long packet that gets the output; writer 1 fills the buffer but must
    // leave the last slot to writer 0
    @(negedge clk);
    out_ready = 1'b0;
    in_src = 1'b0;
    put(mk(3, 40, 0, 1, 0));
    @(negedge clk);
    out_ready = 1'b1;             // header of packet 40 leaves, packet 40 owns the output
    @(negedge clk);
    out_ready = 1'b0;
    in_src = 1'b1;
    put(mk(1, 41, 0, 1, 0));
    put(mk(1, 41, 1, 0, 0));
    put(mk(1, 41, 2, 0, 0));
    put(mk(1, 41, 3, 0, 0));
    #1;
    check(occupancy == 4 && !in_ready, "reserve: other writer stopped at the last free slot");
    in_flit = mk(3, 40, 1, 0, 0);
    in_src = 1'b0;
    in_valid = 1'b1;
    #1;
    check(in_ready, "reserve: owner of the output may take the last slot");
    in_valid = 1'b0;
    put(mk(3, 40, 1, 0, 1));
    @(negedge clk);
    out_ready = 1'b1;
    in_src = 1'b1;
    for (int s = 4; s < 8; s++) put(mk(1, 41, s, 0, s == 7));
    in_src = 1'b0;
    wait_out(10);
    check(outq.size() == 10 && outq[0] == mk(3, 40, 0, 1, 0) && outq[1] == mk(3, 40, 1, 0, 1) &&
          outq[2] == mk(1, 41, 0, 1, 0) && outq[9] == mk(1, 41, 7, 0, 1),
          "reserve: both packets complete");
    outq.delete(); outc.delete();

    // ---- 7: random traffic ----
    begin
      int    npk;
      int    lens [int];
      int    seen [int];
      int    cur_pid, cur_seq, got;
      bit    in_pkt;
      npk = 300;
      fork
        begin
          forever begin
            @(negedge clk);
            out_ready = ($urandom % 4) != 0;
            sh_status = ($urandom % 3) == 0;
            mh_status = ($urandom % 3) == 0;
          end
        end
      join_none
      fork
        begin
          for (int p = 0; p < npk; p++) begin
            int len, lay;
            len = 1 + ($urandom % 8);
            lay = $urandom % 8;
            lens[100 + p] = len;
            put_pkt(lay, 100 + p, len);
          end
        end
        begin
          in_pkt = 1'b0;
          got = 0;
          while (got < npk) begin
            @(posedge clk);
            #2;
            while (outq.size() > 0) begin
              flit_t f;
              f = outq.pop_front();
              void'(outc.pop_front());
              if (f.head) begin
                check(!in_pkt, "random: header only between packets");
                cur_pid = pid_of(f);
                cur_seq = 0;
                in_pkt  = 1'b1;
              end
              check(in_pkt && pid_of(f) == cur_pid && int'(f.data[15:0]) == cur_seq,
                    "random: flits contiguous and in order");
              cur_seq++;
              if (f.tail) begin
                check(lens.exists(cur_pid) && lens[cur_pid] == cur_seq && !seen.exists(cur_pid),
                      "random: packet whole and delivered once");
                seen[cur_pid] = 1;
                in_pkt = 1'b0;
                got++;
              end
            end
          end
        end
      join
      disable fork;
      check(seen.size() == npk, "random: every packet delivered");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
