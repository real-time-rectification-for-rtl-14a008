// disp_calc: SDPS disparity calculator for the disparity pair d (even) and
// d+1 (odd).
//
// Holds the cost registers of both disparities for the three visibility
// states and evaluates the Symmetric Dynamic Programming Stereo recurrences
// for one Cyclopean column x. Costs live on the lattice x+d even, so the even
// cell is updated in the even phase (ev_en, x even) and the odd cell in the
// odd phase (od_en, x odd). When a cell updates, its own registers hold
// C(x-2, d, .) and its neighbours' registers hold C(x-1, d+-1, .):
//
//   C(x,d,B)  = |gL - gR| + min(C(x-2,d,B), C(x-2,d,MR), C(x-1,d-1,ML))
//   C(x,d,ML) = min(C(x-1,d-1,ML), C(x-2,d,B)) + occ
//   C(x,d,MR) = min(C(x-1,d+1,MR), C(x-1,d+1,B)) + occ
//
// The recurrences, the min2/min3/+occ/|-| structure and the predecessor codes
// (MR: 0=B 1=MR; B: 00=B 01=MR 11=ML; ML: 0=B 1=ML) follow the document. Ties
// are resolved towards B, then MR, then ML; this order, the cost width and the
// saturating additions (all ones means "impossible") are this design's
// choices. The even cell's lower neighbour (d-1) is the odd cell of the block
// below; the odd cell's upper neighbour (d+2) is the even cell of the block
// above; missing neighbours are tied to all ones by the parent. HAS_ODD = 0
// disables the odd cell (disparity beyond the range), keeping its costs
// impossible.
//
// Timing: clr (one cycle) sets all costs to zero before a scan line. An
// enable in cycle t updates the cell's costs and its predecessor record
// (pred_e or pred_o) at the end of cycle t.
module disp_calc
  import stereo_pkg::*;
#(
  parameter int PW      = 8,
  parameter int CW      = 20,
  parameter int OW      = 8,
  parameter bit HAS_ODD = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          ev_en,
  input  logic          od_en,
  input  logic [OW-1:0] occ,
  // pixels: gl_e = gL((x+d)/2) for the even cell, gl_o for the odd cell,
  // gr = gR((x-d)/2) shared by both
  input  logic [PW-1:0] gl_e,
  input  logic [PW-1:0] gl_o,
  input  logic [PW-1:0] gr,
  // neighbours
  input  logic [CW-1:0] dn_ml,     // C(d-1, ML) from the block below
  input  logic [CW-1:0] up_mr,     // C(d+2, MR) from the block above
  input  logic [CW-1:0] up_b,      // C(d+2, B)  from the block above
  // own costs
  output logic [CW-1:0] e_b,
  output logic [CW-1:0] e_mr,
  output logic [CW-1:0] e_ml,
  output logic [CW-1:0] o_b,
  output logic [CW-1:0] o_mr,
  output logic [CW-1:0] o_ml,
  // predecessor records
  output pred_t         pred_e,
  output pred_t         pred_o
);

  localparam logic [CW-1:0] INF = '1;

  function automatic logic [CW-1:0] sat_add(input logic [CW-1:0] a,
                                            input logic [CW-1:0] b);
    logic [CW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[CW] ? INF : s[CW-1:0];
  endfunction

  function automatic logic [PW-1:0] absdiff(input logic [PW-1:0] a,
                                            input logic [PW-1:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  typedef struct packed {
    logic [CW-1:0] b;
    logic [CW-1:0] mr;
    logic [CW-1:0] ml;
    pred_t         pr;
  } upd_t;

  // one cell update: own = C(x-2,d,.), lo_ml = C(x-1,d-1,ML),
  // hi_* = C(x-1,d+1,.)
  function automatic upd_t cell_update(input logic [CW-1:0] own_b,
                                input logic [CW-1:0] own_mr,
                                input logic [CW-1:0] lo_ml,
                                input logic [CW-1:0] hi_mr,
                                input logic [CW-1:0] hi_b,
                                input logic [PW-1:0] gl,
                                input logic [PW-1:0] gr_v,
                                input logic [OW-1:0] occ_v);
    upd_t          u;
    logic [CW-1:0] m3, m_ml, m_mr;
    // min3 for B
    if (own_b <= own_mr && own_b <= lo_ml) begin
      m3 = own_b;  u.pr.b = VIS_B;
    end else if (own_mr <= lo_ml) begin
      m3 = own_mr; u.pr.b = VIS_MR;
    end else begin
      m3 = lo_ml;  u.pr.b = VIS_ML;
    end
    // min2 for ML
    if (own_b <= lo_ml) begin m_ml = own_b; u.pr.ml = 1'b0; end
    else                begin m_ml = lo_ml; u.pr.ml = 1'b1; end
    // min2 for MR
    if (hi_b <= hi_mr)  begin m_mr = hi_b;  u.pr.mr = 1'b0; end
    else                begin m_mr = hi_mr; u.pr.mr = 1'b1; end
    u.b  = sat_add(m3, CW'(absdiff(gl, gr_v)));
    u.ml = sat_add(m_ml, CW'(occ_v));
    u.mr = sat_add(m_mr, CW'(occ_v));
    return u;
  endfunction

  upd_t ue, uo;
  always_comb begin
    ue = cell_update(e_b, e_mr, dn_ml, o_mr, o_b, gl_e, gr, occ);
    uo = cell_update(o_b, o_mr, e_ml, up_mr, up_b, gl_o, gr, occ);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      {e_b, e_mr, e_ml} <= '0;
      if (HAS_ODD) {o_b, o_mr, o_ml} <= '0;
      else         {o_b, o_mr, o_ml} <= {INF, INF, INF};
      pred_e <= '0;
      pred_o <= '0;
    end else begin
      if (ev_en) begin
        e_b    <= ue.b;
        e_mr   <= ue.mr;
        e_ml   <= ue.ml;
        pred_e <= ue.pr;
      end
      if (od_en && HAS_ODD) begin
        o_b    <= uo.b;
        o_mr   <= uo.mr;
        o_ml   <= uo.ml;
        pred_o <= uo.pr;
      end
    end
  end

endmodule
