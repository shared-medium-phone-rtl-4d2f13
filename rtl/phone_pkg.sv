// phone_pkg: constants shared by the blocks of the shared-medium phone.
//
// The frame on the wire is a 32-bit sync word, an 11-bit length field
// (data bits that follow) and the data, sent as 14-bit blocks: one byte
// plus six parity bits. Packets inside a frame start with a header byte
// {from[3:0], to[3:0]} and a packet type byte (0 = calling/ringing,
// 1 = voice). The field widths and the two type codes follow the
// document; the sync word value and the header bit order are this
// design's choices.
package phone_pkg;
  localparam int unsigned DATA_W  = 8;    // byte carried per block
  localparam int unsigned BLOCK_W = 14;   // byte + 6 parity bits
  localparam int unsigned SYNC_W  = 32;   // sync sequence length
  localparam int unsigned LEN_W   = 11;   // length field, in data bits
  localparam int unsigned NUM_W   = 4;    // phone / conference number
  // Largest number of whole blocks a length field of LEN_W bits can describe.
  localparam int unsigned FRAME_MAX_BLOCKS = ((1 << LEN_W) - 1) / BLOCK_W;

  localparam logic [SYNC_W-1:0] SYNC_WORD = 32'hE2B4_6D1F;

  localparam logic [7:0] PTYPE_CALL  = 8'h00;
  localparam logic [7:0] PTYPE_VOICE = 8'h01;

  typedef enum logic [1:0] {
    PH_IDLE    = 2'd0,
    PH_CALLING = 2'd1,
    PH_RINGING = 2'd2,
    PH_IN_CALL = 2'd3
  } phone_state_e;

  // Header byte layout: from in the upper nibble, to in the lower one.
  function automatic logic [7:0] make_header(logic [NUM_W-1:0] from_n,
                                             logic [NUM_W-1:0] to_n);
    return {from_n, to_n};
  endfunction
endpackage
