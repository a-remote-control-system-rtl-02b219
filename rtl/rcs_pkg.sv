// rcs_pkg: types and constants shared by the remote control system.
//
// The system talks over a G-LINK pair in 16-bit mode. Every instruction (local
// host -> HSC) and every response (HSC -> local host) is one message: a 14-bit
// control word, optionally followed by two 16-bit data words (high half first).
//
// The instruction names follow the instruction set of the system. The bit layout
// of the control word is this design's own choice:
//
//   bit 13 = 1 : eTBC access          [12] 1=read  [11] error (responses)
//                                     [10:8] eTBC register address  [7:0] data
//   bit 13 = 0 : all other opcodes    [12:9] opcode  [8:0] operand
//
// In a response with bit 13 = 0, operand bit 8 says that two data words follow.
// An instruction carries data words only for setVMEA and setVMED; the
// interruptVME message sent by the HSC always carries two (the status ID).
package rcs_pkg;

  localparam int unsigned CW_W    = 14;  // G-LINK control word payload
  localparam int unsigned WORD_W  = 16;  // G-LINK word
  localparam int unsigned NLINES  = 21;  // N-lines N1 (HSC itself) and N2..N21

  typedef enum logic [3:0] {
    OP_IDLE          = 4'd0,
    OP_SET_VME_A     = 4'd1,
    OP_SET_VME_D     = 4'd2,
    OP_CONFIG_VME    = 4'd3,
    OP_INTERRUPT_VME = 4'd4,
    OP_ENABLE_INT    = 4'd5,
    OP_INHIBIT_VME   = 4'd6,
    OP_RESET_HSC     = 4'd7,
    OP_CONFIG_JTAG   = 4'd8
  } opcode_e;

  // configVME operand bits
  localparam int unsigned CV_WRITE = 0;  // 1 = write, 0 = read
  localparam int unsigned CV_A32   = 1;  // 1 = A32, 0 = A24
  localparam int unsigned CV_D32   = 2;  // 1 = D32, 0 = D16

  // configVME response status bits (operand)
  localparam int unsigned RS_TIMEOUT   = 0;
  localparam int unsigned RS_BERR      = 1;
  localparam int unsigned RS_INHIBITED = 2;
  localparam int unsigned RS_HAS_DATA  = 8;

  // resetHSC operand bits
  localparam int unsigned RST_SPE  = 0;  // SPE and VME controller
  localparam int unsigned RST_ETBC = 1;  // eTBC reset pin

  // One G-LINK message: control word plus optional 32-bit data.
  typedef struct packed {
    logic [CW_W-1:0] ctrl;
    logic            has_data;
    logic [31:0]     data;
  } msg_t;

  // VME access modes (address modifiers are the VME standard ones)
  localparam logic [5:0] AM_A24_DATA = 6'h39;
  localparam logic [5:0] AM_A32_DATA = 6'h09;

  function automatic logic [CW_W-1:0] cw_op(input opcode_e op, input logic [8:0] operand);
    return {1'b0, op, operand};
  endfunction

  function automatic logic cw_is_etbc(input logic [CW_W-1:0] cw);
    return cw[13];
  endfunction

  function automatic opcode_e cw_opcode(input logic [CW_W-1:0] cw);
    return opcode_e'(cw[12:9]);
  endfunction

  // Number of data words that follow an instruction control word.
  function automatic logic instr_has_data(input logic [CW_W-1:0] cw);
    return !cw[13] && (cw[12:9] == OP_SET_VME_A || cw[12:9] == OP_SET_VME_D);
  endfunction

  // Number of data words that follow a response control word.
  function automatic logic resp_has_data(input logic [CW_W-1:0] cw);
    return !cw[13] && cw[RS_HAS_DATA];
  endfunction

  // SPE-handled instructions travel through the PPE instruction arbiter.
  function automatic logic instr_for_spe(input logic [CW_W-1:0] cw);
    return !cw[13] && (cw[12:9] inside {OP_SET_VME_A, OP_SET_VME_D, OP_CONFIG_VME,
                                        OP_INTERRUPT_VME, OP_ENABLE_INT, OP_INHIBIT_VME});
  endfunction

endpackage
