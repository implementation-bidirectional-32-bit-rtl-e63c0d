// switching_pkg: types and constants shared by the two-exchange time-division switch.
//
// Every subscriber line carries one 32-bit opcode word. Its fields, from bit 31 down:
//   [31]    en     - subscriber enabled (1) or idle (0)
//   [30]    inter  - 1: call goes to the other exchange, 0: call stays in this exchange
//   [29:26] dst    - number of the called subscriber
//   [25:22] src    - number of the calling subscriber (its caller ID)
//   [21:16] zero   - unused, zero
//   [15:0]  data   - 16-bit payload
// The field layout is the published one. The memory word formats below (data memory
// {en,data}, control memory {valid, source exchange, source location}) are this design's.
package switching_pkg;

  localparam int unsigned N_EXCH   = 2;    // two exchanges
  localparam int unsigned N_USERS  = 16;   // subscribers per exchange
  localparam int unsigned ID_W     = 4;    // width of a subscriber number
  localparam int unsigned DATA_W   = 16;   // payload bits per opcode

  typedef struct packed {
    logic              en;
    logic              inter;
    logic [ID_W-1:0]   dst;
    logic [ID_W-1:0]   src;
    logic [5:0]        zero;
    logic [DATA_W-1:0] data;
  } opcode_t;

  // One data-memory location: the payload of an inlet and whether it was enabled.
  typedef struct packed {
    logic              en;
    logic [DATA_W-1:0] data;
  } dm_word_t;

  // One control-memory location (one per outlet): which inlet feeds it.
  typedef struct packed {
    logic            valid;    // a call is connected to this outlet
    logic            src_ex;   // exchange of the calling inlet (0 = first, 1 = second)
    logic [ID_W-1:0] src_loc;  // inlet location (data-memory address) of the caller
  } cm_entry_t;

  // Phases of one switching frame.
  typedef enum logic [1:0] {
    PH_IDLE    = 2'd0,  // after reset, or while enable is low before the first frame
    PH_SCAN    = 2'd1,  // phase 1: sequential write of all inlets
    PH_DELIVER = 2'd2   // phase 2: random read to all outlets
  } phase_t;

  // Word handed to a called subscriber: the caller's enable and inter bits, the caller's
  // number in the dst field, zero in the src field, the caller's payload.
  function automatic opcode_t make_delivered(input logic inter, input logic [ID_W-1:0] caller,
                                             input logic [DATA_W-1:0] data);
    opcode_t w;
    w.en    = 1'b1;
    w.inter = inter;
    w.dst   = caller;
    w.src   = '0;
    w.zero  = '0;
    w.data  = data;
    return w;
  endfunction

endpackage
