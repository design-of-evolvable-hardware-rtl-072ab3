// ehw_model_pkg: reference model of the EHW array and of the fitness unit's
// scoring, used by the testbenches to work out expected fitness values
// independently of the RTL.
//
// The model keeps the four registered outputs of every cell and advances them
// one clock at a time from the edge inputs and the configuration bits
// (8 bits per cell, {right, left, down, up}; 00 AND of the four inputs,
// 01 OR, 10 NOT of the opposite input, 11 that input). score() reproduces one
// evaluation: cells cleared, then each vector held for SETTLE clocks with the
// masked outputs compared before the last of them.
package ehw_model_pkg;

  localparam int ROWS = 6;
  localparam int COLS = 6;
  localparam int EDGE = 2 * (ROWS + COLS);
  localparam int CFGW = 8 * ROWS * COLS;

  typedef logic [CFGW-1:0] cfg_t;

  // The grid size is a class parameter; the package-level ROWS/COLS/EDGE
  // describe the default 6x6 array.
  class ehw_model #(int R = ROWS, int C = COLS);
    localparam int E = 2 * (R + C);
    typedef logic [8*R*C-1:0] cfg_rc_t;
    typedef logic [3*E-1:0]   vec_t;
    bit ou[R][C], od[R][C], ol[R][C], orr[R][C];

    function void clear();
      foreach (ou[r, c]) begin
        ou[r][c] = 0; od[r][c] = 0; ol[r][c] = 0; orr[r][c] = 0;
      end
    endfunction

    static function bit fn(bit [1:0] f, bit opp, bit a, bit o);
      case (f)
        2'b00: return a;
        2'b01: return o;
        2'b10: return !opp;
        default: return opp;
      endcase
    endfunction

    function void step(cfg_rc_t cfg, logic [E-1:0] ein);
      bit nu[R][C], nd[R][C], nl[R][C], nr[R][C];
      for (int r = 0; r < R; r++) begin
        for (int c = 0; c < C; c++) begin
          bit iu, idn, il, ir, a, o;
          bit [7:0] cc;
          iu  = (r == 0)      ? ein[c]                 : od[r-1][c];
          idn = (r == R-1)    ? ein[C + R + c]         : ou[r+1][c];
          il  = (c == 0)      ? ein[2*C + R + r]       : orr[r][c-1];
          ir  = (c == C-1)    ? ein[C + r]             : ol[r][c+1];
          a = iu & idn & il & ir;
          o = iu | idn | il | ir;
          cc = cfg[8*(r*C+c) +: 8];
          nu[r][c] = fn(cc[1:0], idn, a, o);
          nd[r][c] = fn(cc[3:2], iu,  a, o);
          nl[r][c] = fn(cc[5:4], ir,  a, o);
          nr[r][c] = fn(cc[7:6], il,  a, o);
        end
      end
      ou = nu; od = nd; ol = nl; orr = nr;
    endfunction

    function logic [E-1:0] outs();
      logic [E-1:0] e;
      for (int c = 0; c < C; c++) begin
        e[c]               = ou[0][c];
        e[C + R + c]       = od[R-1][c];
      end
      for (int r = 0; r < R; r++) begin
        e[C + r]             = orr[r][C-1];
        e[2*C + R + r]       = ol[r][0];
      end
      return e;
    endfunction

    // vecs[k] = {mask, expected, input}
    function int score(cfg_rc_t cfg, vec_t vecs[$], int settle);
      int n = 0;
      clear();
      foreach (vecs[k]) begin
        logic [E-1:0] vin, vexp, vmask;
        {vmask, vexp, vin} = vecs[k];
        for (int s = 0; s < settle - 1; s++) step(cfg, vin);
        if (((outs() ^ vexp) & vmask) == '0) n++;
        step(cfg, vin);
      end
      return n;
    endfunction
  endclass

  // 3-bit adder: a on edge inputs 0..2, b on 3..5 (top edge), the 4-bit sum
  // expected on edge outputs 12..15 (bottom edge).
  function automatic void adder_vectors(ref logic [3*EDGE-1:0] v[$]);
    v.delete();
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        logic [EDGE-1:0] vin, vexp, vmask;
        vin   = EDGE'(a | (b << 3));
        vexp  = EDGE'((a + b) << 12);
        vmask = EDGE'(4'hF << 12);
        v.push_back({vmask, vexp, vin});
      end
  endfunction

  // State machine of four states 00 -> 01 -> 11 -> 10 on input 1, back on 0
  // (00 stays on 0, 01 and 11 go to 00 on 0, 10 goes to 11 on 0 and stays on
  // 1). The input is edge input 0; the expected state is on edge outputs
  // 12 (low bit) and 13 (high bit) after each input.
  function automatic void fsm_vectors(ref logic [3*EDGE-1:0] v[$]);
    bit [1:0] st = 2'b00;
    bit seq[$] = '{0,1,1,1,1,0,0,1,0,1,1,0,1,1,1,1,1,0,0,0,1,1,0,1,0,1,1,1,0,1,0,0};
    v.delete();
    foreach (seq[i]) begin
      logic [EDGE-1:0] vin, vexp, vmask;
      case (st)
        2'b00: st = seq[i] ? 2'b01 : 2'b00;
        2'b01: st = seq[i] ? 2'b11 : 2'b00;
        2'b11: st = seq[i] ? 2'b10 : 2'b00;
        2'b10: st = seq[i] ? 2'b10 : 2'b11;
      endcase
      vin   = EDGE'(seq[i]);
      vexp  = EDGE'(st) << 12;
      vmask = EDGE'(2'b11) << 12;
      v.push_back({vmask, vexp, vin});
    end
  endfunction

endpackage
