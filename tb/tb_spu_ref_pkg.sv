// tb_spu_ref_pkg: testbench reference model of the VSR signal processing
// unit and a builder for a demonstration delay-and-add program.
//
// The model keeps the data memory as a list of 32 sample blocks, newest
// first, and rotates that list when a sample set arrives (the oldest block
// becomes the newest and gets the ten new samples in words 0..9).  It
// executes the instructions with plain integer arithmetic.  It shares no code
// with the RTL.
package tb_spu_ref_pkg;
  import vsr_pkg::*;

  localparam int NBLK = 32;
  localparam int BW   = 32;

  class spu_model;
    int          blk [NBLK][BW];   // blk[n][w]: word w, n sets ago
    longint      acc;
    int          ring_pos;         // index of the 1 in the ring counter
    instr_t      prog [$];
    // results of the last run
    int          out_data [$];
    int          out_tag  [$];
    int          n_exec;

    function new();
      foreach (blk[n, w]) blk[n][w] = 0;
      acc = 0;
      ring_pos = -1;
    endfunction

    static function int wrap16(longint v);
      logic [63:0] u = 64'(v);
      logic [15:0] t = u[15:0];
      return int'($signed(t));
    endfunction

    static function longint wrap32(longint v);
      logic [63:0] u = 64'(v);
      logic [31:0] t = u[31:0];
      return longint'($signed(t));
    endfunction

    function int rd(int a);
      return blk[a / BW][a % BW];
    endfunction

    function void wr(int a, int v);
      blk[a / BW][a % BW] = v;
    endfunction

    // A new sample set arrives (ADC codes, offset binary) and the program runs.
    function void new_set(input int codes [N_CH]);
      int keep [BW];
      keep = blk[NBLK-1];
      for (int n = NBLK-1; n > 0; n--) blk[n] = blk[n-1];
      blk[0] = keep;
      for (int c = 0; c < N_CH; c++) blk[0][c] = codes[c] - 512;
      ring_pos = (ring_pos + 1) % RING_W;
      run();
    endfunction

    function void run();
      out_data.delete();
      out_tag.delete();
      n_exec = 0;
      foreach (prog[i]) begin
        instr_t in = prog[i];
        longint p = longint'(rd(int'(in.field))) * longint'($signed(in.k));
        n_exec++;
        case (in.op)
          OP_READ:   acc = wrap32(acc + p);
          OP_MAX:    if (p > acc) acc = p;
          OP_WRITE:  wr(int'(in.field), wrap16(acc >>> FRAC));
          OP_ABS:    if (acc < 0) acc = wrap32(-acc);
          OP_CMP:    acc = (acc > (longint'($signed(in.k)) <<< FRAC))
                           ? (longint'(in.field) <<< FRAC) : 0;
          OP_OUTPUT: if (in.k[ring_pos]) begin
                       out_data.push_back(wrap16(acc >>> FRAC) & 32'hFFFF);
                       out_tag.push_back(int'(in.field));
                     end
          OP_HALT:   break;
          default:   ;
        endcase
      end
    endfunction
  endclass

  function automatic instr_t mk(opcode_e op, logic [15:0] k, int field);
    instr_t i;
    i.op = op;
    i.k = k;
    i.field = 10'(field);
    return i;
  endfunction

  // Delay-and-add VSR program for NV velocity channels.  Channel c of
  // velocity j is delayed by (N_CH-1-c)*d[j]/4 sample periods (d in quarter
  // samples), using linear interpolation between two stored samples.  The
  // sum is written to word 10+j, rectified to word 14+j, smoothed as
  // y = 1/4*|s| + 3/4*y_prev into word 18+j and output every fourth set
  // (mask 16'h1111, tag j).  A thresholded detection bit (tag 8+j) is output
  // on the other sets of mask 16'h4444; the largest y is output with tag 15
  // on every set.  Program words: 1 NOP, body, HALT.
  function automatic void build_vsr(ref instr_t p [$], input int d [4], input int thr);
    p.delete();
    p.push_back(mk(OP_NOP, 0, 0));
    for (int j = 0; j < 4; j++) begin
      p.push_back(mk(OP_CMP, 16'h7FFF, 0));                 // acc = 0
      for (int c = 0; c < N_CH; c++) begin
        int dq = (N_CH - 1 - c) * d[j];                     // quarter samples
        int n0 = dq / 4;
        int f  = dq % 4;
        p.push_back(mk(OP_READ, 16'((4 - f) * 8192 - (f == 0 ? 1 : 0)), c + BW * n0));
        if (f != 0) p.push_back(mk(OP_READ, 16'(f * 8192), c + BW * (n0 + 1)));
      end
      p.push_back(mk(OP_WRITE, 0, 10 + j));
      p.push_back(mk(OP_ABS, 0, 0));
      p.push_back(mk(OP_WRITE, 0, 14 + j));
      p.push_back(mk(OP_CMP, 16'h7FFF, 0));
      p.push_back(mk(OP_READ, 8192, 14 + j));               // 1/4 |s|
      p.push_back(mk(OP_READ, 24576, 18 + j + BW));         // 3/4 y[n-1]
      p.push_back(mk(OP_WRITE, 0, 18 + j));
      p.push_back(mk(OP_OUTPUT, 16'h1111, j));
      p.push_back(mk(OP_CMP, 16'(thr), 1));                      // detection bit
      p.push_back(mk(OP_OUTPUT, 16'h4444, 8 + j));
    end
    p.push_back(mk(OP_CMP, 16'h7FFF, 0));
    for (int j = 0; j < 4; j++) p.push_back(mk(OP_MAX, 32767, 18 + j));
    p.push_back(mk(OP_OUTPUT, 16'hFFFF, 15));
    p.push_back(mk(OP_HALT, 0, 0));
  endfunction

  // Memory-clearing program: zeroes the variable words 10..31 of the newest
  // block.  Run for 32 sample sets of zero-valued samples it leaves every word
  // of the data memory at zero, the state the reference model starts from.
  function automatic void build_clear(ref instr_t p [$]);
    p.delete();
    p.push_back(mk(OP_CMP, 16'h7FFF, 0));
    for (int w = N_CH; w < BW; w++) p.push_back(mk(OP_WRITE, 16'h0, w));
    p.push_back(mk(OP_HALT, 16'h0, 0));
  endfunction

  // Intrinsic velocity spectrum program: NV delay-and-add channels for the
  // velocities V0, V0+DV, ... over NCH adjacent channels (0..NCH-1, the
  // signal travelling from channel 0 towards channel NCH-1), followed by
  // rectification and a peak hold y = max(|s|, y_prev * decay).  Velocity j
  // outputs its peak once every 16 sets, when ring bit j is set (tag j), so
  // sixteen results leave one per set.  With hold = 0 there is no peak word:
  // every velocity outputs its rectified sum on every set.
  //
  // The delay from channel c is (NCH-1-c)*pitch*fs/v sample periods, with
  // linear interpolation.  Samples older than 30 sets are not in the sample
  // words (block 31 is being refilled), so the program extends the history
  // itself: each run it copies -x(30) of a channel into a variable word E1,
  // which then holds -x(30+n) in block n, and copies E1 of block 31 negated
  // into E2, which holds x(61+n), and so on: chain level L holds
  // (-1)^L * x(30 + 31*(L-1) + n) in block n.  A constant of -1.0 (16'h8000)
  // makes every copy exact.  Word use: chain words first, then one peak word
  // per velocity; the builder reports the ages it needed.
  function automatic void build_ivs(ref instr_t p [$], input int nv, input real v0,
                                    input real dv, input int nch, input real pitch_fs,
                                    input logic [15:0] decay, input bit hold,
                                    output int max_age,
                                    output int words_used);
    localparam int NL = 4;                 // chain levels: ages up to 154
    int  e [NL+1][N_CH];
    int  w = N_CH;
    int  pk0;
    real dmax = pitch_fs / v0;
    p.delete();
    max_age = 0;
    for (int c = 0; c < nch; c++) begin
      int need;
      need = int'($floor(real'(nch - 1 - c) * dmax)) + 1;
      for (int l = 1; l <= NL; l++) begin
        e[l][c] = -1;
        if (need > 30 + 31 * (l - 1)) begin e[l][c] = w; w++; end
      end
    end
    pk0 = w;
    words_used = hold ? w + nv : w;
    // history extension copies
    for (int c = 0; c < nch; c++)
      for (int l = 1; l <= NL; l++)
        if (e[l][c] >= 0) begin
          p.push_back(mk(OP_CMP, 16'h7FFF, 0));
          p.push_back(mk(OP_READ, 16'h8000, l == 1 ? c + BW * 30 : e[l-1][c] + BW * 31));
          p.push_back(mk(OP_WRITE, 0, e[l][c]));
        end
    for (int j = 0; j < nv; j++) begin
      real d;
      d = pitch_fs / (v0 + dv * j);
      p.push_back(mk(OP_CMP, 16'h7FFF, 0));
      for (int c = 0; c < nch; c++) begin
        real dl, f;
        int  a0;
        dl = real'(nch - 1 - c) * d;
        a0 = int'($floor(dl));
        f  = dl - real'(a0);
        for (int t = 0; t < 2; t++) begin
          int  a, addr, sg, kk;
          real wt;
          a  = a0 + t;
          wt = (t == 0) ? 1.0 - f : f;
          if (a > max_age && wt > 0.0) max_age = a;
          if (a <= 30) begin
            addr = c + BW * a;
            sg = 1;
          end else begin
            int l;
            l    = (a - 30 + 30) / 31;             // ceil((a - 30) / 31)
            addr = e[l][c] + BW * (a - 30 - 31 * (l - 1));
            sg   = (l % 2 == 1) ? -1 : 1;
          end
          kk = sg * int'(wt * 32768.0);
          if (kk > 32767) kk = 32767;
          if (kk != 0) p.push_back(mk(OP_READ, 16'(kk), addr));
        end
      end
      p.push_back(mk(OP_ABS, 0, 0));
      if (hold) begin
        p.push_back(mk(OP_MAX, decay, pk0 + j + BW));
        p.push_back(mk(OP_WRITE, 0, pk0 + j));
        p.push_back(mk(OP_OUTPUT, 16'(1 << (j % 16)), j));
      end else
        p.push_back(mk(OP_OUTPUT, 16'hFFFF, j));
    end
    p.push_back(mk(OP_HALT, 0, 0));
  endfunction

endpackage
