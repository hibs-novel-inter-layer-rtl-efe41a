// tb_transfer_stage: self-checking testbench of one transfer stage (layer 1 of a 4-layer stack).
//
// Three sources feed the stage: the upper segment (packets travelling down, for layers 0-1),
// the lower segment (travelling up, for layers 1-3) and the local interface (for layers 0, 2,
// 3). Three sinks take its outputs: the upper segment (must only see packets for layers 2-3),
// the lower segment (layer 0) and the interface (layer 1). A directed test first checks that
// an 8-flit packet forwarded upward leaves one cycle after each flit arrives, at one flit per
// cycle. The random test stalls every sink and toggles the neighbours' status wires, then
// checks that every packet comes out exactly once, whole, uninterleaved and at the right sink.
module tb_transfer_stage;
  import hibs_pkg::*;

  localparam int MY = 1;     // the module default

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  [2:0] sv, sr;        // sources: 0 upper, 1 lower, 2 local
  flit_t       sf [3];
  logic  [2:0] kv, kr;        // sinks: 0 upper, 1 lower, 2 local
  flit_t       kf [3];
  logic        up_sh = 1'b0, up_mh = 1'b0, dn_sh = 1'b0, dn_mh = 1'b0, ej_cong = 1'b0;
  logic        mh_up, mh_dn, sh_o, byp_up, byp_dn, m3c;

  transfer_stage dut (
    .clk(clk), .rst_n(rst_n),
    .up_in_valid(sv[0]), .up_in_ready(sr[0]), .up_in_flit(sf[0]),
    .up_out_valid(kv[0]), .up_out_ready(kr[0]), .up_out_flit(kf[0]),
    .up_sh_status_i(up_sh), .up_mh_status_i(up_mh), .mh_status_up_o(mh_up),
    .dn_in_valid(sv[1]), .dn_in_ready(sr[1]), .dn_in_flit(sf[1]),
    .dn_out_valid(kv[1]), .dn_out_ready(kr[1]), .dn_out_flit(kf[1]),
    .dn_sh_status_i(dn_sh), .dn_mh_status_i(dn_mh), .mh_status_dn_o(mh_dn),
    .sh_status_o(sh_o),
    .inj_valid(sv[2]), .inj_ready(sr[2]), .inj_flit(sf[2]),
    .ej_valid(kv[2]), .ej_ready(kr[2]), .ej_flit(kf[2]), .ej_congested_i(ej_cong),
    .bypass_up_o(byp_up), .bypass_dn_o(byp_dn), .m3_conflict_o(m3c)
  );

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  // data: layer(3) core(4) src(2) pid(11) seq(12)
  function automatic flit_t mk(int layer, int src, int pid, int seq, bit head, bit tail);
    flit_t f;
    f.head = head;
    f.tail = tail;
    f.data = {layer[2:0], 4'd0, src[1:0], pid[10:0], seq[11:0]};
    return f;
  endfunction

  function automatic bit sink_ok(int k, int layer);
    case (k)
      0: return layer > MY;
      1: return layer < MY;
      default: return layer == MY;
    endcase
  endfunction

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int lens [int];            // key src*4096 + pid
  int seen [int];
  bit k_busy [3];
  int k_key [3], k_seq [3];
  longint k_cyc [3][$];
  int delivered = 0;

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 3; k++) if (kv[k] && kr[k]) begin
      flit_t f;
      int key;
      f = kf[k];
      key = int'(f.data[24:23]) * 4096 + int'(f.data[22:12]);
      k_cyc[k].push_back(cyc);
      checks++;
      if (f.head) begin
        if (k_busy[k] || !sink_ok(k, int'(hdr_layer(f)))) begin
          failures++;
          $display("FAIL: sink %0d header misrouted or interleaved (t=%0t)", k, $time);
        end
        k_busy[k] = 1'b1;
        k_key[k]  = key;
        k_seq[k]  = 0;
      end else if (!k_busy[k] || key != k_key[k] || int'(f.data[11:0]) != k_seq[k]) begin
        failures++;
        $display("FAIL: sink %0d body flit out of packet (t=%0t)", k, $time);
      end
      k_seq[k]++;
      if (f.tail) begin
        checks++;
        if (!lens.exists(key) || lens[key] != k_seq[k] || seen.exists(key)) begin
          failures++;
          $display("FAIL: sink %0d packet length or duplicate (t=%0t)", k, $time);
        end
        seen[key] = 1;
        k_busy[k] = 1'b0;
        delivered++;
      end
    end
  end

  longint s_cyc [3][$];
  task automatic send(int i, int layer, int pid, int len, bit gaps);
    lens[i * 4096 + pid] = len;
    for (int s = 0; s < len; s++) begin
      @(negedge clk);
      while (gaps && ($urandom % 4) == 0) begin
        sv[i] = 1'b0;
        @(negedge clk);
      end
      sv[i] = 1'b1;
      sf[i] = mk(layer, i, pid, s, s == 0, s == len - 1);
      #1;
      while (!sr[i]) begin
        @(negedge clk);
        #1;
      end
      @(posedge clk);
      s_cyc[i].push_back(cyc);
    end
    #1 sv[i] = 1'b0;
  endtask

  task automatic source(int i, int npk);
    for (int p = 0; p < npk; p++) begin
      int layer;
      case (i)
        0: layer = $urandom % 2;
        1: layer = 1 + ($urandom % 3);
        default: do layer = $urandom % 4; while (layer == MY);
      endcase
      send(i, layer, 100 + p, 1 + ($urandom % 8), 1'b1);
    end
  endtask

  int n_byp = 0, n_m3c = 0;
  always @(posedge clk) if (rst_n) begin
    if (byp_up || byp_dn) n_byp++;
    if (m3c) n_m3c++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sv = '0;
    kr = 3'b111;
    for (int i = 0; i < 3; i++) sf[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // directed: forwarding upward streams at one flit per cycle, one cycle per stage
    send(1, 3, 1, 8, 1'b0);
    repeat (3) @(posedge clk);
    #1;
    check(k_cyc[0].size() == 8, "stream: 8 flits forwarded up");
    for (int i = 0; i < 8 && i < k_cyc[0].size(); i++)
      check(k_cyc[0][i] == s_cyc[1][i] + 1, $sformatf("stream: flit %0d one cycle through", i));

    // status wires follow the stage's buffers
    check(sh_o == ej_cong && !mh_up && !mh_dn, "status idle");
    ej_cong = 1'b1;
    #1;
    check(sh_o, "SH_Status follows the interface FIFO");
    ej_cong = 1'b0;

    // random
    fork
      forever begin
        @(negedge clk);
        kr[0] = ($urandom % 3) != 0;
        kr[1] = ($urandom % 3) != 0;
        kr[2] = ($urandom % 4) != 0;
        up_sh = ($urandom % 3) == 0;
        up_mh = ($urandom % 3) == 0;
        dn_sh = ($urandom % 3) == 0;
        dn_mh = ($urandom % 3) == 0;
      end
    join_none
    fork
      source(0, 150);
      source(1, 150);
      source(2, 150);
    join
    repeat (100) @(posedge clk);
    check(delivered == 451, $sformatf("random: all packets delivered (%0d)", delivered));
    check(n_byp > 0, "random: non-blocking bypass happened");
    check(n_m3c > 0, "random: M3 conflict happened");
    disable fork;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
