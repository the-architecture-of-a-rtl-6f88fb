// dvbs2_pkg: types and constants shared by the DVB-S2 IF receiver blocks.
//
// Complex samples travel between blocks as a packed struct of two signed 16-bit
// parts. After the matched filter a symbol of unit amplitude is represented by
// UNIT (4096), leaving a factor of eight headroom. Phases are unsigned 16-bit
// fractions of a full turn (65536 = 2*pi). The frame-structure constants (SOF
// word, 90-symbol slots, 36-symbol pilot blocks every 16 slots) are those of the
// DVB-S2 physical layer; the receiver structure around them follows the
// receiver architecture this RTL implements, and the number formats are this
// design's own choice.
package dvbs2_pkg;

  localparam int DW    = 16;            // width of one real part
  localparam int PW    = 16;            // phase width, 2^PW = one turn
  localparam int UNIT  = 4096;          // unit symbol amplitude after the DAGC
  localparam int LLRW  = 6;             // soft-bit width

  localparam int SLOT_LEN     = 90;     // symbols per slot and per PL header
  localparam int SOF_LEN      = 26;     // start-of-frame field length
  localparam int PILOT_LEN    = 36;     // symbols per pilot block
  localparam int PILOT_PERIOD = 16;     // slots between pilot blocks
  localparam logic [25:0] SOF_WORD = 26'h18D2E82;

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef enum logic [1:0] {MOD_QPSK = 2'd0, MOD_8PSK = 2'd1,
                            MOD_16APSK = 2'd2, MOD_32APSK = 2'd3} mod_t;

  typedef enum logic [1:0] {SYM_UNLOCKED = 2'd0, SYM_HEADER = 2'd1,
                            SYM_DATA = 2'd2, SYM_PILOT = 2'd3} sym_kind_t;

  // Position tag that travels with every symbol once the frame is found.
  typedef struct packed {
    sym_kind_t   kind;
    logic        frame_first;   // first symbol of the PL header
    logic        data_first;    // first data symbol of the frame
    logic        pilot_last;    // last symbol of a pilot block
    logic [15:0] idx;           // index inside the header, pilot block or data field
  } sym_tag_t;

  // Bits carried by one symbol of each modulation.
  function automatic int bits_per_sym(mod_t m);
    case (m)
      MOD_QPSK:   return 2;
      MOD_8PSK:   return 3;
      MOD_16APSK: return 4;
      default:    return 5;
    endcase
  endfunction

  // Saturate a wide signed value into DW bits.
  function automatic logic signed [DW-1:0] sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sd32767;
    else if (v < -48'sd32768) return -16'sd32768;
    else                      return v[DW-1:0];
  endfunction

endpackage
