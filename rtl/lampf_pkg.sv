// lampf_pkg: types and constants shared by the accelerator control chain.
//
// The control system links a central computer to 55 accelerator modules. The
// Computer Interface Unit (CIU) sends each remote unit (RICE) serial frames on
// two lines (data and timing), collects one data word per module on a third
// line, and watches a command-busy line, the fourth. This package fixes the
// frame layout, the computer's request-word layout, the RICE channel map and
// the module groups used by broadcast addressing.
//
// From the document: 55 modules, up to 63 channels per module, 10-bit binary
// channels, 10 bits plus sign for analog data, a parity bit on transmissions
// to the RICE, two 16-bit request words, the three RICE functions CMD, DTK and
// VDO, and the RICE I/O capacity (32 analog, 11 binary in, 3 binary out,
// 15 pulse outputs). The bit positions in every word and frame, the frame
// type codes, the channel map and the group codes are this design's choice.
package lampf_pkg;

  // ---- accelerator organisation -------------------------------------------
  localparam int N_MODULES   = 55;  // 4 injectors, buncher, 4 LF, 45 HF, sector
  localparam int N_INJ       = 4;
  localparam int N_BUNCHER   = 1;
  localparam int N_LF        = 4;
  localparam int N_HF        = 45;
  localparam int FIRST_LF    = N_INJ + N_BUNCHER;            // 5
  localparam int FIRST_HF    = FIRST_LF + N_LF;              // 9
  localparam int SECTOR_MOD  = FIRST_HF + N_HF;              // 54

  // ---- data formats ---------------------------------------------------------
  localparam int CH_W   = 6;    // 63 usable channel addresses, 0 = none
  localparam int ARG_W  = 10;   // ten-bit instruction / binary channel word
  localparam int MAG_W  = 10;   // analog magnitude bits (plus a sign bit)

  // RICE functions, carried in every instruction frame
  typedef enum logic [1:0] {
    FN_NONE = 2'd0,
    FN_CMD  = 2'd1,   // command: binary output or pulse-motor output
    FN_DTK  = 2'd2,   // data take: select channel for sampling
    FN_VDO  = 2'd3    // video channel select
  } rice_fn_e;

  // Serial frame types: the first two bits of every frame on the data line
  typedef enum logic [1:0] {
    FR_RSVD    = 2'd0,
    FR_INSTR   = 2'd1,   // followed by INSTR_W payload bits and a parity bit
    FR_CONVERT = 2'd2,   // sample/convert now (no payload)
    FR_COLLECT = 2'd3    // RICE returns RET_W bits on the return line
  } frame_e;

  typedef struct packed {
    rice_fn_e          fn;
    logic [CH_W-1:0]   chan;
    logic [1:0]        flags;   // CMD: [0]=clockwise; VDO: [0]=lower cable
    logic [ARG_W-1:0]  arg;     // CMD: bits or pulse count; VDO: unused
  } rice_instr_t;
  localparam int INSTR_W = $bits(rice_instr_t);   // 20

  // Word returned by a RICE on the collect line, MSB first
  typedef struct packed {
    logic              valid;   // data register holds a completed sample
    logic              perr;    // last instruction frame failed parity
    logic              sign;    // analog sign (1 = negative)
    logic [MAG_W-1:0]  mag;     // analog magnitude or ten binary bits
  } rice_ret_t;
  localparam int RET_W = $bits(rice_ret_t);       // 13

  // Odd parity: payload plus parity bit hold an odd number of ones
  function automatic logic odd_parity(input rice_instr_t p);
    return ~(^p);
  endfunction

  // ---- computer request words (two 16-bit words to the CIU) ---------------
  typedef enum logic [2:0] {
    OP_NOP     = 3'd0,
    OP_CMD     = 3'd1,
    OP_DTK     = 3'd2,
    OP_VDO     = 3'd3,
    OP_COLLECT = 3'd4
  } ciu_op_e;

  // word 0: [15:13] op, [12:7] module field, [6:1] channel, [0] sync
  typedef struct packed {
    ciu_op_e          op;
    logic [5:0]       module_f;  // 0..54 one module, 55.. groups, 63 all
    logic [CH_W-1:0]  chan;
    logic             sync;      // DTK: convert at cycle-clock = delay after next pulse
  } ciu_word0_t;

  // module field codes for group addressing
  localparam logic [5:0] GRP_INJ = 6'd55;
  localparam logic [5:0] GRP_LF  = 6'd56;
  localparam logic [5:0] GRP_HF  = 6'd57;
  localparam logic [5:0] GRP_ALL = 6'd63;

  // Select mask for a module field (modules beyond n are never selected)
  function automatic logic [N_MODULES-1:0] module_mask(input logic [5:0] f);
    logic [N_MODULES-1:0] m;
    m = '0;
    for (int i = 0; i < N_MODULES; i++) begin
      unique case (1'b1)
        (f < 6'(N_MODULES)): m[i] = (i == int'(f));
        (f == GRP_INJ):      m[i] = (i < N_INJ);
        (f == GRP_LF):       m[i] = (i >= FIRST_LF) && (i < FIRST_HF);
        (f == GRP_HF):       m[i] = (i >= FIRST_HF) && (i < SECTOR_MOD);
        (f == GRP_ALL):      m[i] = 1'b1;
        default:             m[i] = 1'b0;
      endcase
    end
    return m;
  endfunction

  // ---- RICE I/O channel map -------------------------------------------------
  localparam int N_AIN  = 32;   // analog inputs
  localparam int N_BIN  = 11;   // binary input channels, 10 bits each
  localparam int N_BOUT = 3;    // binary output channels, 10 bits + latches
  localparam int N_PULSE = 15;  // pulse-motor outputs (cw and ccw lines)

  localparam int CH_AIN0   = 1;                      // 1..32
  localparam int CH_BIN0   = CH_AIN0 + N_AIN;        // 33..43
  localparam int CH_BOUT0  = CH_BIN0 + N_BIN;        // 44..46
  localparam int CH_PULSE0 = CH_BOUT0 + N_BOUT;      // 47..61

  typedef enum logic [2:0] {
    CK_NONE, CK_AIN, CK_BIN, CK_BOUT, CK_PULSE
  } chan_kind_e;

  function automatic chan_kind_e chan_kind(input logic [CH_W-1:0] c);
    int ci;
    ci = int'(c);
    if (ci >= CH_AIN0 && ci < CH_BIN0)        return CK_AIN;
    else if (ci >= CH_BIN0 && ci < CH_BOUT0)  return CK_BIN;
    else if (ci >= CH_BOUT0 && ci < CH_PULSE0) return CK_BOUT;
    else if (ci >= CH_PULSE0 && ci < CH_PULSE0 + N_PULSE) return CK_PULSE;
    else                                       return CK_NONE;
  endfunction

  // Index of a channel within its kind
  function automatic logic [4:0] chan_index(input logic [CH_W-1:0] c);
    int ci;
    ci = int'(c);
    unique case (chan_kind(c))
      CK_AIN:   return 5'(ci - CH_AIN0);
      CK_BIN:   return 5'(ci - CH_BIN0);
      CK_BOUT:  return 5'(ci - CH_BOUT0);
      CK_PULSE: return 5'(ci - CH_PULSE0);
      default:  return 5'd0;
    endcase
  endfunction

endpackage
