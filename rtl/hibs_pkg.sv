// hibs_pkg: types and constants shared by the blocks of the HIBS inter-layer bus.
//
// The bus moves packets of flits between the layers of a 3D stack. A flit is 32 data bits
// (the flit width used throughout the design) plus two sideband marks, head and tail, that
// delimit a wormhole packet. The header flit carries the destination layer address, which
// every transfer stage decodes, and the destination IP-core address inside that layer, which
// only the router of the destination layer decodes. The field positions below are this
// design's own choice; the width of the core field covers a 4x4 mesh per layer.
//
// Header flit data layout:
//   [31:29] destination layer  (layer 0 is the bottom of the stack)
//   [28:25] destination IP-core/memory in that layer
//   [24:0]  free for the router (source, packet id, ...)
package hibs_pkg;

  parameter int unsigned FLIT_W  = 32;
  parameter int unsigned LAYER_W = 3;
  parameter int unsigned CORE_W  = 4;

  typedef logic [LAYER_W-1:0] layer_t;
  typedef logic [CORE_W-1:0]  core_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Packet type kept in a TS unit table row: a single-hop packet ends in the next layer,
  // a multiple-hop packet passes through it.
  typedef enum logic {
    PKT_SH = 1'b0,
    PKT_MH = 1'b1
  } pkt_type_e;

  function automatic layer_t hdr_layer(flit_t f);
    return f.data[FLIT_W-1 -: LAYER_W];
  endfunction

  function automatic core_t hdr_core(flit_t f);
    return f.data[FLIT_W-1-LAYER_W -: CORE_W];
  endfunction

  function automatic logic [FLIT_W-1:0] make_header(layer_t layer, core_t core,
                                                     logic [FLIT_W-LAYER_W-CORE_W-1:0] rest);
    return {layer, core, rest};
  endfunction

endpackage
