// backtrack: back-track module of the SDPS correspondence module.
//
// Once a scan line has been processed, this block follows the stored
// predecessor codes from the best final state back to the start of the line
// and emits one Cyclopean point per clock: its index x (2W-1 down to 0), its
// disparity d and its visibility state (B, MR or ML). The disparity list thus
// comes out right to left, as in the document. The step taken for each
// predecessor code follows the cost recurrences:
//
//   state B : pred B  -> (x-2, d,   B)     pred MR -> (x-2, d, MR)
//             pred ML -> (x-1, d-1, ML)
//   state ML: pred ML -> (x-1, d-1, ML)    pred B  -> (x-2, d, B)
//   state MR: pred MR -> (x-1, d+1, MR)    pred B  -> (x-1, d+1, B)
//
// A two-column step skips one Cyclopean index; this design emits that index
// with the disparity and state of the point it was reached from, so every x
// of the line gets exactly one output.
//
// The predecessor array word k holds columns x = 2k and 2k+1. To walk one x
// per cycle with a synchronous memory, the block keeps the word of the current
// column in a register and always has the next lower word arriving from the
// memory (read address ((x-1) >> 1) - 1 each cycle). Start-up takes two cycles.
//
// Interface: start (one cycle) with bank, d0 and s0 (the arg-min at x = 2W-1)
// begins a walk; rd_bank/rd_addr/rd_data connect to the predecessor array.
// out_valid/out_x/out_d/out_state/out_last stream the result, 2W points;
// busy is high from start until the last point.
module backtrack
  import stereo_pkg::*;
#(
  parameter int W  = 1024,
  parameter int NC = 42,
  localparam int AW = $clog2(W),
  localparam int XW = $clog2(2 * W),
  localparam int DW = $clog2(NC),
  localparam int RW = PRED_W * NC
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          bank,
  input  logic [DW-1:0] d0,
  input  vis_t          s0,
  output logic          rd_bank,
  output logic [AW-1:0] rd_addr,
  input  logic [RW-1:0] rd_data,
  output logic          out_valid,
  output logic [XW-1:0] out_x,
  output logic [DW-1:0] out_d,
  output vis_t          out_state,
  output logic          out_last,
  output logic          busy
);

  typedef enum logic [1:0] {IDLE, LOAD0, LOAD1, RUN} st_t;
  st_t st;

  logic [XW-1:0] x;
  logic [DW-1:0] d, pend_d;
  vis_t          s, pend_s;
  logic          fill;
  logic          bank_q;
  logic [RW-1:0] cur_word;
  pred_t         p;

  logic [DW-1:0] nd;
  vis_t          ns;
  logic          jump2;

  // step decision from the predecessor record of (x, d)
  always_comb begin
    p     = pred_t'(cur_word[PRED_W * d +: PRED_W]);
    nd    = d;
    ns    = VIS_B;
    jump2 = 1'b0;
    unique case (s)
      VIS_B: begin
        if (p.b == VIS_ML) begin
          nd = d - 1'b1; ns = VIS_ML;
        end else begin
          jump2 = 1'b1;
          ns    = (p.b == VIS_MR) ? VIS_MR : VIS_B;
        end
      end
      VIS_ML: begin
        if (p.ml) begin
          nd = d - 1'b1; ns = VIS_ML;
        end else begin
          jump2 = 1'b1; ns = VIS_B;
        end
      end
      VIS_MR: begin
        nd = d + 1'b1;
        ns = p.mr ? VIS_MR : VIS_B;
      end
      default: ;
    endcase
  end

  always_comb begin
    rd_bank = bank_q;
    unique case (st)
      IDLE:    rd_addr = AW'(W - 1);
      LOAD0:   rd_addr = AW'(W - 1);
      LOAD1:   rd_addr = AW'(W - 2);
      default: rd_addr = AW'(((x - 1'b1) >> 1) - 1'b1);
    endcase
  end


  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st       <= IDLE;
      bank_q   <= 1'b0;
      x        <= '0;
      d        <= '0;
      s        <= VIS_B;
      pend_d   <= '0;
      pend_s   <= VIS_B;
      fill     <= 1'b0;
      cur_word <= '0;
    end else begin
      unique case (st)
        IDLE: if (start) begin
          st     <= LOAD0;
          bank_q <= bank;
          x      <= XW'(2 * W - 1);
          d      <= d0;
          s      <= s0;
          fill   <= 1'b0;
        end
        LOAD0: st <= LOAD1;
        LOAD1: begin
          cur_word <= rd_data;     // word W-1
          st       <= RUN;
        end
        RUN: begin
          if (x == '0) begin
            st <= IDLE;
          end else begin
            x <= x - 1'b1;
            if (!x[0]) cur_word <= rd_data;   // entering the next lower word
            if (fill) begin
              fill <= 1'b0;
              d    <= pend_d;
              s    <= pend_s;
            end else if (jump2) begin
              fill   <= 1'b1;
              pend_d <= nd;
              pend_s <= ns;
            end else begin
              d <= nd;
              s <= ns;
            end
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign out_valid = (st == RUN);
  assign out_x     = x;
  assign out_d     = d;
  assign out_state = s;
  assign out_last  = (st == RUN) && (x == '0);
  assign busy      = (st != IDLE);

endmodule
