// rct_pkg: types and constants shared by the regional calorimeter trigger ASICs.
//
// Tower data from the front end is an 8-bit compressed energy plus one
// fine-grain bit; two towers travel per serial link per 25 ns bunch crossing
// in a 24-bit frame (18 data bits, 5 Hamming check bits, 1 spare bit) sent as
// three 8-bit words at 120 MHz. Inside the crate everything runs at 160 MHz,
// four 6.25 ns cycles per crossing. The e/gamma path works on 7-bit energies
// with one veto bit; the energy-sum path on 11-bit signed operands that carry
// a tower-overflow (TOV) and an arithmetic-overflow (AOV) flag.
//
// The widths are the ones the trigger design specifies. The bit order inside
// the frame and inside the packed structs is this implementation's choice.
package rct_pkg;

  // ---------------------------------------------------------------- links
  localparam int unsigned LINK_DATA_W  = 8;   // one 8-bit word every 120 MHz cycle
  localparam int unsigned LINK_STAT_W  = 2;   // receiver status bits per word
  localparam int unsigned FRAME_DATA_W = 18;  // two towers of 8 + 1 bits
  localparam int unsigned EDC_W        = 5;   // Hamming check bits

  // Receiver status encoding (per received word).
  localparam logic [1:0] ST_DATA  = 2'b00;    // data transmission mode
  localparam logic [1:0] ST_SETUP = 2'b01;    // link in setup mode (idle characters)

  // One word as delivered by a channel of the serial receiver.
  typedef struct packed {
    logic                   err;     // receiver error bit
    logic [LINK_STAT_W-1:0] status;  // receiver status
    logic [LINK_DATA_W-1:0] data;
  } link_word_t;                     // 11 bits

  typedef struct packed {
    logic       fg;                  // fine-grain bit
    logic [7:0] et;                  // compressed energy
  } tower_t;                         // 9 bits

  // A complete, phased frame of one link.
  typedef struct packed {
    tower_t                 t1;
    tower_t                 t0;
    logic [EDC_W-1:0]       edc;     // received Hamming code
    logic                   spare;
    logic [LINK_STAT_W-1:0] status;  // status of the last word of the frame
    logic                   rx_err;  // receiver error on any word of the frame
    logic                   down;    // setup mode / not framed during this frame
  } frame_t;

  // Content of the 9-bit error channel, one word per link.
  typedef struct packed {
    logic                   any_err; // overall error indicator
    logic                   rx_err;
    logic [LINK_STAT_W-1:0] status;
    logic [EDC_W-1:0]       edc;     // transmitted EDC
  } err_word_t;                      // 9 bits

  // ---------------------------------------------------------- e/gamma path
  localparam int unsigned EG_W = 7;
  typedef struct packed {
    logic            veto;
    logic [EG_W-1:0] e;
  } eg_t;                            // 8 bits

  // Two-tower sum with the veto bits of the reference and the neighbour.
  typedef struct packed {
    logic [EG_W:0] sum;
    logic          veto_ref;
    logic          veto_nbr;
  } pair_t;                          // 10 bits

  // -------------------------------------------------------------- adders
  localparam int unsigned ADD_W = 11;
  typedef struct packed {
    logic             aov;           // bit 12
    logic             tov;           // bit 11
    logic [ADD_W-1:0] val;           // signed, two's complement
  } add_op_t;                        // 13 bits

  // -------------------------------------------------------------- sorting
  localparam int unsigned RANK_W = 6;
  localparam int unsigned TAG_W  = 4;
  typedef struct packed {
    logic [RANK_W-1:0] rank;
    logic [TAG_W-1:0]  tag;
  } sort_op_t;                       // 10 bits

  // Reduce a 7-bit corner-tower energy to 3 bits: any upper bit set
  // saturates the 3-bit scale.
  function automatic logic [2:0] corner_reduce(input logic [6:0] e);
    return (|e[6:3]) ? 3'b111 : e[2:0];
  endfunction

endpackage
