// Shared types and constants of the PSB synchronising chip.
//
// The chip runs in one 40 MHz bunch-crossing (bx) clock domain. A serial-link
// channel delivers two 16-bit words per bx (the A word in the first 12.5 ns
// tick, the B word in the second); inside the chip a channel word is the 32-bit
// pair {B, A}. The numbers below (8 channels, 64 LVDS bits, 256-word ring
// buffer, 8k-word SIM/SPY memory, orbit length 3564, chip identifiers) are the
// document's; FIFO and queue depths are this design's choice.
package psb_pkg;

  localparam int unsigned N_CHAN      = 8;     // serial-link channels
  localparam int unsigned N_LVDS      = 64;    // parallel LVDS trigger bits
  localparam int unsigned N_GRP       = N_LVDS / 4;  // 4-bit LVDS groups
  localparam int unsigned WORD_W      = 16;    // one serial-link word
  localparam int unsigned CHW         = 2 * WORD_W;  // {B, A} per bx
  localparam int unsigned BX_W        = 12;    // bunch number width
  localparam int unsigned EVNR_W      = 24;    // event number width
  localparam int unsigned CL_W        = 28;    // Channel Link word width

  localparam logic [15:0] MAX_BC_DEFAULT = 16'h0DEB;  // 3563 = orbit length - 1
  localparam logic [15:0] CHIP_ID        = 16'h8131;
  localparam logic [15:0] VERSION_NR     = 16'h0005;
  localparam logic [15:0] CHIP_IDH       = 16'h0001;

  // CHAN_REGx bit fields (bits 15..6 are free)
  typedef struct packed {
    logic [9:0] free;
    logic       en_trx_data;     // bit 5
    logic       sel_contin_mode; // bit 4
    logic       sel_sim_mode;    // bit 3
    logic       sel_lvdsdata;    // bit 2
    logic [1:0] sel_phase;       // bits 1..0
  } chan_reg_t;

  // ROP_SETUP bits 1..0
  typedef enum logic [1:0] {
    PSB_DISCONNECTED = 2'b00,
    PSB_BUSY         = 2'b01,
    PSB_READY        = 2'b10,
    PSB_BAD_CODE     = 2'b11
  } psb_mode_e;

  typedef struct packed {
    logic [11:0] unused;
    logic        en_robust;      // bit 3
    logic        five_bx_event;  // bit 2
    psb_mode_e   psb_mode;       // bits 1..0
  } rop_setup_t;

  // CMD_PULSE bits
  typedef struct packed {
    logic       reset_error_flag; // 15
    logic       stop_rop_vme;     // 14
    logic       start_rop_vme;    // 13
    logic       res_bc_error;     // 12
    logic       res_evnr_vme;     // 11
    logic       res_orbitnr_vme;  // 10
    logic       bcres_vme;        // 9
    logic       l1res_vme;        // 8
    logic [7:0] run_next_orbit;   // 7..0
  } cmd_pulse_t;

  // Channel Link record word identifiers (bits 27..24)
  localparam logic [3:0] CL_HDR_A = 4'hA;
  localparam logic [3:0] CL_HDR_B = 4'hB;
  localparam logic [3:0] CL_HDR_C = 4'hC;
  localparam logic [3:0] CL_HDR_D = 4'hD;
  localparam logic [3:0] CL_DATA  = 4'h1;
  localparam logic [3:0] CL_END   = 4'hE;
  localparam logic [27:0] CL_TRAILER = 28'hFFFFFFF;

  // Words of one bunch-crossing section of a record: 4 headers, 8 A words,
  // 8 B words, 4 end words.
  localparam int unsigned WORDS_PER_BX = 4 + 2 * N_CHAN + 4;  // 24

endpackage
