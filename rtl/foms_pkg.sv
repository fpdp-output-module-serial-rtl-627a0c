// foms_pkg -- types and constants shared by the FOMS transmitter and receiver.
//
// The 32-bit FPDP command word is described as a packed struct whose field
// positions follow the command word layout: alpha data in bits 11..0, the
// four control bits READY/SPARE/BYPASS/CONVERT in bits 12..15, the 3-bit
// output (channel) select in 18..16, the 5-bit module select in 23..19, a
// parity bit over bits 0..15 in bit 24, a parity bit over bits 16..23 in
// bit 25, Sync in 26, PC Fault in 27, a spare bit in 28 and the 3-bit group
// select in 31..29. The 16 low bits are the payload that is sent serially.
//
// Parity is odd everywhere (the serial parity bit is specified as odd; using
// odd parity for the two FPDP parity bits too is this design's choice).
//
// The default ("reset"/"safe") level is chosen by a jumper block with four
// positions: 0x000, 0xFFF, 0x7FF and 0x800. More than one position fitted is
// an error; no position fitted is treated as 0x000 (a design choice).
package foms_pkg;

  localparam int unsigned NUM_CHANNELS = 8;   // serial outputs per module
  localparam int unsigned FRAME_BITS   = 17;  // data + odd parity

  // Serial frame timing in half-bit units: sync high 1.5 bit, sync low 1.5 bit
  localparam int unsigned SYNC_HIGH_HALVES = 3;
  localparam int unsigned SYNC_LOW_HALVES  = 3;

  typedef struct packed {
    logic [2:0]  group_sel;   // 31..29
    logic        spare28;     // 28
    logic        pc_fault;    // 27
    logic        sync;        // 26
    logic        par_addr;    // 25: parity over bits 16..23
    logic        par_data;    // 24: parity over bits 0..15
    logic [4:0]  module_sel;  // 23..19
    logic [2:0]  chan_sel;    // 18..16 (P.S. select)
    logic        convert;     // 15
    logic        bypass;      // 14
    logic        spare13;     // 13
    logic        ready;       // 12
    logic [11:0] alpha;       // 11..0
  } cmd_word_t;

  // Update-method jumper J5, one bit per fitted position
  typedef struct packed {
    logic async_78;   // J5 7-8: asynchronous
    logic ext_56;     // J5 5-6: external sync (P2 input)
    logic fsync_34;   // J5 3-4: FPDP sync
    logic pio2_12;    // J5 1-2: FPDP PIO2 sync
  } j5_t;

  typedef enum logic [2:0] {
    UPD_ASYNC,
    UPD_FPDP_SYNC,
    UPD_EXT_SYNC,
    UPD_PIO2_SYNC,
    UPD_ERROR
  } upd_mode_t;

  // Default-level jumper (JMPR 3 positions 3-4, 5-6, 7-8, 9-10)
  typedef struct packed {
    logic lvl_800;    // 9-10
    logic lvl_7ff;    // 7-8
    logic lvl_fff;    // 5-6
    logic lvl_000;    // 3-4
  } dflt_jmp_t;

  // Odd parity bit: makes the total count of ones (data + parity) odd
  function automatic logic odd_parity16(input logic [15:0] d);
    return ~(^d);
  endfunction

  function automatic logic odd_parity8(input logic [7:0] d);
    return ~(^d);
  endfunction

  function automatic upd_mode_t decode_j5(input j5_t j);
    unique case (j)
      4'b1000: return UPD_ASYNC;
      4'b0100: return UPD_EXT_SYNC;
      4'b0010: return UPD_FPDP_SYNC;
      4'b0001: return UPD_PIO2_SYNC;
      default: return UPD_ERROR;
    endcase
  endfunction

  // 12-bit default level selected by the jumper (0x000 when none or several)
  // Board test points of the transmitter, named after the signals they
  // show; active-low names follow the board's convention.
  typedef struct packed {
    logic buf_d11;        // TP1  buffered bus data bit 11
    logic fifo_d11;       // TP2  FIFO output data bit 11
    logic fifo_load;      // TP3  FIFO write (one PSTROBE cycle per word)
    logic load_sr;        // TP4  shift-register load, any channel
    logic fifo_unload;    // TP5  FIFO read (one clk cycle per word)
    logic fifo_sync_n;    // TP9  sync flag of the FIFO output word, low active
    logic fifo_dvalid_n;  // TP10 FIFO holds data, low active
    logic buf_dvalid_n;   // TP15 input buffer holds a valid word, low active
    logic buf_sync_n;     // TP17 input buffer holds a SYNC* word, low active
    logic write_sr;       // TP46 holding-register write, any channel
    logic sel_sr0;        // TP47 holding register 0 selected
    logic sel_sr1;        // TP48 holding register 1 selected
  } test_pts_t;

  function automatic logic [11:0] default_level(input dflt_jmp_t j);
    unique case (j)
      4'b0010: return 12'hFFF;
      4'b0100: return 12'h7FF;
      4'b1000: return 12'h800;
      default: return 12'h000;
    endcase
  endfunction

  function automatic logic default_level_error(input dflt_jmp_t j);
    return $countones(j) > 1;
  endfunction

endpackage
