// nocenc_pkg: types and constants shared by the link encoders and decoders.
//
// The encoders reduce link power by transmitting each body flit either as is
// or with a fixed set of its wires inverted. Every inversion used here is an
// XOR of the flit with one of three masks: the odd mask (wires 1, 3, 5, ...),
// the even mask (wires 0, 2, 4, ...) or the full mask (all wires). The wire
// numbering starts at 0 with the least significant wire.
//
// The two topmost link wires carry the inversion state. Wire W-1 (an odd
// wire for even W) is the inversion bit "inv": it is cleared before encoding
// and ends up set whenever the odd wires were inverted (odd or full
// inversion), as the scheme I and II descriptions require. Wire W-2 (an even
// wire) is only used by schemes II and III: it is cleared before encoding and
// ends up set whenever the even wires were inverted (full or even
// inversion), which lets the decoder tell odd from full inversion. Using
// wire W-2 for this is a choice of this design; scheme I keeps it as a
// payload wire. Both control wires are ordinary link wires, so their own
// transitions are part of the cost the encoders minimise.
package nocenc_pkg;

  // Default link width, in wires, including the control wires.
  localparam int unsigned LINK_W = 32;

  // Encoding scheme selected in the sender NI.
  typedef enum logic [1:0] {
    SCHEME_NONE = 2'd0,  // no encoding: body flits pass unchanged
    SCHEME_I    = 2'd1,  // odd inversion or none
    SCHEME_II   = 2'd2,  // odd, full or no inversion
    SCHEME_III  = 2'd3   // odd, even, full or no inversion
  } scheme_e;

  // Inversion applied to one flit.
  typedef enum logic [1:0] {
    INV_NONE = 2'd0,
    INV_ODD  = 2'd1,
    INV_EVEN = 2'd2,
    INV_FULL = 2'd3
  } inv_e;

  // Sideband that travels with every flit in a wormhole NoC.
  typedef struct packed {
    logic head;  // first flit of a packet (routing information, never encoded)
    logic tail;  // last flit of a packet
  } flit_kind_t;

  // Repeating wire patterns. A module of width W takes the low W bits:
  // ODD_PATTERN[W-1:0] selects wires 1, 3, 5, ...; EVEN_PATTERN[W-1:0]
  // selects wires 0, 2, 4, ... Links up to MAX_W wires are supported.
  localparam int unsigned MAX_W = 1024;
  localparam logic [MAX_W-1:0] ODD_PATTERN  = {(MAX_W/2){2'b10}};
  localparam logic [MAX_W-1:0] EVEN_PATTERN = {(MAX_W/2){2'b01}};

endpackage
