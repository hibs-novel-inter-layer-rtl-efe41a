// bisync_fifo: bi-synchronous (dual-clock) FIFO used by the layer interface.
//
// Each stacked layer may run at its own clock (globally asynchronous, locally synchronous), so
// the words that cross between a layer's router and the bus pass through a FIFO whose write
// side and read side are clocked independently. The document names this FIFO but not its
// insides; this is the usual Gray-code pointer design: each side keeps a binary pointer one
// bit wider than the address, publishes it in Gray code, and the other side brings it over
// through a two-flop synchroniser. Full and empty are therefore pessimistic for two cycles of
// the observing clock, never wrong.
//
// Interface: valid/ready on both sides. A word is written on a wclk edge with wvalid && wready
// and read on an rclk edge with rvalid && rready; rdata shows the oldest word whenever rvalid
// is high (first-word fall-through). wcount is the occupancy seen by the write side and
// w_congested goes high when wcount reaches THRESH_PCT percent of DEPTH.
// DEPTH must be a power of two (Gray pointers); the default of 8 is this design's choice.
// Each side has its own synchronous active-low reset; both must be applied together.
module bisync_fifo #(
  parameter int unsigned WIDTH      = 34,
  parameter int unsigned DEPTH      = 8,
  parameter int unsigned THRESH_PCT = 80
) (
  input  logic                     wclk,
  input  logic                     wrst_n,
  input  logic                     wvalid,
  output logic                     wready,
  input  logic [WIDTH-1:0]         wdata,
  output logic [$clog2(DEPTH):0]   wcount,
  output logic                     w_congested,

  input  logic                     rclk,
  input  logic                     rrst_n,
  output logic                     rvalid,
  input  logic                     rready,
  output logic [WIDTH-1:0]         rdata
);

  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW:0] ptr_t;

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("bisync_fifo: DEPTH must be a power of two");

  function automatic ptr_t bin2gray(ptr_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic ptr_t gray2bin(ptr_t g);
    ptr_t b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [WIDTH-1:0] mem [DEPTH];

  ptr_t wbin, wgray, rbin, rgray;
  ptr_t rgray_w1, rgray_w2;   // read pointer synchronised into wclk
  ptr_t wgray_r1, wgray_r2;   // write pointer synchronised into rclk
  ptr_t rbin_w, wbin_r;

  // ---------------- write side ----------------
  assign rbin_w      = gray2bin(rgray_w2);
  assign wcount      = wbin - rbin_w;
  assign wready      = (wcount != ptr_t'(DEPTH));
  assign w_congested = (32'(wcount) * 100) >= (DEPTH * THRESH_PCT);

  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wvalid && wready) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (wvalid && wready) mem[wbin[AW-1:0]] <= wdata;
  end

  // ---------------- read side ----------------
  assign wbin_r = gray2bin(wgray_r2);
  assign rvalid = (wbin_r != rbin);
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rvalid && rready) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

endmodule
