// vsr_pkg: constants and types shared by the electrode unit (EU), the
// monitoring unit (MU) back-channel receiver and the VSR signal processing
// unit (SPU).
//
// Frame format (EU -> MU back channel): one start bit '1', then for channel
// 0..9 the 10-bit ADC sample LSB first followed by its parity bit, i.e.
// 1 + 10*11 = 111 bits.  The 110 sample+parity bits, the 10-bit samples, the
// ten channels and the five ADCs follow the document; the parity sense (even)
// is this design's choice.
//
// SPU instruction word: 3-bit opcode, 16-bit constant, 10-bit data address or
// second constant (29 bits), as the document gives.  The opcode numbering is
// this design's choice.  The accumulator is 32 bits (document); the 16-bit
// data memory word and the Q15 scaling of the constant are this design's
// choices.
package vsr_pkg;

  // ---------------- electrode unit / back channel ----------------
  localparam int unsigned N_CH       = 10;                   // dipole channels
  localparam int unsigned N_ADC      = 5;                    // interleaved ADCs
  localparam int unsigned SAMPLE_W   = 10;                   // ADC resolution
  localparam int unsigned WORD_BITS  = SAMPLE_W + 1;         // sample + parity
  localparam int unsigned FRAME_BITS = 1 + N_CH * WORD_BITS; // 111 on the wire

  typedef logic [SAMPLE_W-1:0] sample_t;

  // Even parity: the parity bit makes the number of ones in data+parity even.
  function automatic logic even_parity(input sample_t s);
    return ^s;
  endfunction

  // ---------------- signal processing unit ----------------
  localparam int unsigned OP_W    = 3;
  localparam int unsigned CONST_W = 16;
  localparam int unsigned FIELD_W = 10;
  localparam int unsigned INSTR_W = OP_W + CONST_W + FIELD_W; // 29
  localparam int unsigned ACC_W   = 32;
  localparam int unsigned WORD_W  = 16;   // data memory word
  localparam int unsigned FRAC    = 15;   // constant is Q1.15
  localparam int unsigned RING_W  = 16;   // one-hot output ring counter

  typedef enum logic [OP_W-1:0] {
    OP_NOP    = 3'd0,
    OP_READ   = 3'd1,  // acc += mem[a] * k
    OP_MAX    = 3'd2,  // acc  = max(acc, mem[a] * k)
    OP_WRITE  = 3'd3,  // mem[a] = acc >>> FRAC
    OP_ABS    = 3'd4,  // acc  = |acc|
    OP_CMP    = 3'd5,  // acc  = (acc > k << FRAC) ? field << FRAC : 0
    OP_OUTPUT = 3'd6,  // out  = acc >>> FRAC when (ring & k) != 0
    OP_HALT   = 3'd7   // stop until the next sample set
  } opcode_e;

  typedef struct packed {
    opcode_e             op;
    logic [CONST_W-1:0]  k;      // 16-bit constant / output mask / threshold
    logic [FIELD_W-1:0]  field;  // data address or second constant
  } instr_t;

endpackage
