// spu: VSR signal processing unit of the monitoring unit.
//
// A small fixed-point processor that turns the ten-channel sample stream of
// an electrode unit into a few velocity-channel results (delay and add,
// filtering, rectification, thresholding, sub-sampled output), all written
// as one straight-line program that runs once per sample set in constant
// time.
//
// Samples arrive one channel at a time (s_valid, s_ch, s_data) and are
// stored through memory port A at consecutive addresses of the next block;
// set_done marks the last channel of a set.  It moves the address base back
// by one BLOCK, rotates the output ring counter and restarts the program.
// The program addresses data relative to the newest sample set, so word c is
// always channel c's newest sample and c + n*BLOCK the same channel n sample
// sets earlier; words 10..31 of a block hold the program's own variables,
// which age the same way.  ADC codes are stored as two's complement words
// (offset-binary MSB inverted, sign-extended).
//
// Pipeline: stage 1 fetches from the program memory, stage 2 reads the data
// memory, executes and writes back (sub-blocks spu_sequencer, spu_imem,
// spu_addr_offset, spu_sample_mem, spu_alu).  A program of L instructions
// ending with HALT takes L+1 cycles from set_done to halt.
// The architecture follows the document; the offset-binary conversion, the
// program load port and the output tag are this design's choices.
// The address base and the accumulator are wired out of their sub-blocks
// for observation only and have no load here (lint reports them unused).
module spu
  import vsr_pkg::*;
#(
  parameter int unsigned DMEM_DEPTH = 1024,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned BLOCK      = 32,
  parameter int unsigned DADDR_W    = $clog2(DMEM_DEPTH),
  parameter int unsigned PC_W       = $clog2(IMEM_DEPTH),
  parameter int unsigned CH_W       = $clog2(N_CH)
) (
  input  logic                clk,
  input  logic                rst_n,
  // incoming samples
  input  logic                s_valid,
  input  logic [CH_W-1:0]     s_ch,
  input  sample_t             s_data,
  input  logic                set_done,
  // program load
  input  logic                prog_we,
  input  logic [PC_W-1:0]     prog_addr,
  input  instr_t              prog_data,
  // results
  output logic                out_valid,
  output logic [WORD_W-1:0]   out_data,
  output logic [FIELD_W-1:0]  out_tag,
  output logic                running,
  output logic                overrun
);

  logic                 fetch_en, ex_valid, halt;
  logic [PC_W-1:0]      pc;
  logic [RING_W-1:0]    ring;
  instr_t               ex_instr;
  logic [DADDR_W-1:0]   proc_paddr, sample_paddr, base;
  logic [WORD_W-1:0]    b_rdata, b_wdata, a_wdata;
  logic                 b_we;
  logic signed [ACC_W-1:0] acc;

  spu_sequencer #(.IMEM_DEPTH(IMEM_DEPTH), .RING_W(RING_W)) u_seq (
    .clk, .rst_n, .start(set_done), .halt, .fetch_en, .pc, .ex_valid, .ring,
    .running, .overrun
  );

  spu_imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .wr_en(prog_we), .wr_addr(prog_addr), .wr_data(prog_data),
    .rd_en(fetch_en), .rd_addr(pc), .rd_data(ex_instr)
  );

  spu_addr_offset #(.DEPTH(DMEM_DEPTH), .BLOCK(BLOCK), .N_CH(N_CH)) u_aoff (
    .clk, .rst_n, .set_done,
    .proc_vaddr(DADDR_W'(ex_instr.field)), .proc_paddr,
    .sample_ch(s_ch), .sample_paddr, .base
  );

  assign a_wdata = WORD_W'($signed({~s_data[SAMPLE_W-1], s_data[SAMPLE_W-2:0]}));

  spu_sample_mem #(.DEPTH(DMEM_DEPTH), .WORD_W(WORD_W)) u_dmem (
    .clk,
    .a_we(s_valid), .a_addr(sample_paddr), .a_wdata,
    .b_addr(proc_paddr), .b_rdata, .b_we, .b_wdata
  );

  spu_alu u_alu (
    .clk, .rst_n, .ex_valid, .instr(ex_instr), .mem_rdata(b_rdata), .ring,
    .mem_we(b_we), .mem_wdata(b_wdata), .halt,
    .out_valid, .out_data, .out_tag, .acc
  );

endmodule
