// Shared types for the multiprocessor network components.
//
// All links carry 64-bit words. A word on a link is a flit_t: a valid bit, a
// two-bit kind that marks the head and tail words of a wormhole worm, and the
// 64-bit data word. The 64-bit word size follows the described networks; the
// kind side-band and the header layout are this design's own choices.
//
// Wormhole header word layout (data field of a FL_HEAD flit):
//   [15:0]  destination port
//   [31:16] source port
//   [63:32] free (the traffic model puts a message number there)
package mpnet_pkg;
  localparam int unsigned WORD_W = 64;

  typedef enum logic [1:0] {
    FL_BODY = 2'd0,  // payload word of a worm, or any word in a circuit network
    FL_HEAD = 2'd1,  // first word of a worm, carries the destination
    FL_TAIL = 2'd2   // last word of a worm, releases the path
  } flit_kind_e;

  typedef struct packed {
    logic              valid;
    flit_kind_e        kind;
    logic [WORD_W-1:0] data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  // Worm shape used by the wormhole network: one header, ten payload flits,
  // one tail word.
  localparam int unsigned WORM_PAYLOAD = 10;
  localparam int unsigned WORM_LEN     = WORM_PAYLOAD + 2;
endpackage
