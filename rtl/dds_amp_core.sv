// dds_amp_core: amplitude core of the DDS, a Jordan circle generator.
//
// Instead of looking sine and cosine up in a table, the core walks a point
// (x, y) around the circle x^2 + y^2 = R^2 on the integer grid, counter-
// clockwise, one unit step at a time. x is the cosine amplitude and y the
// sine amplitude. For each step it evaluates both candidate moves
//   move along x: F + PDFx*dx + 1      move along y: F + PDFy*dy + 1
// where F = x^2 + y^2 - R^2 is the circle function at the current point and
// PDFx = 2x, PDFy = 2y are its partial derivatives, and takes the move whose
// new |F| is smaller (one compare). The taken move updates F (one addition)
// and the counters x, y, PDFx (+-2), PDFy (+-2) (increments). These are the
// update equations of the generator as published; no multiplier is needed,
// and the logic grows linearly with WIDTH. One revolution is 8R steps.
//
// Step directions (this design's choice where the equations leave it open):
// dx = -1 when y >= 0, else +1; dy = +1 when x >= 0, else -1, which gives
// counter-clockwise motion. On a tie of |F| the y move is taken.
//
// Interface and timing:
//   restart   synchronous; loads (x, y) = (radius, 0), F = 0. Takes
//             precedence over step_en. radius is the amplitude word.
//   step_en   one step on this clock edge. x/y change on the next cycle.
//   dir       combinational: the axis the next step will move along.
//   upd, x_d, y_d  combinational: the core registers are being written this
//             edge (restart or step) and the coordinates they will hold.
//   wrap      combinational: this step lands on the positive x axis, i.e. a
//             revolution is completed.
//   x, y      registered amplitude outputs (cosine, sine).
module dds_amp_core
  import dds_pkg::*;
#(
  parameter int unsigned WIDTH = DEF_WIDTH
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    restart,
  input  logic [WIDTH-2:0]        radius,
  input  logic                    step_en,
  output step_dir_e               dir,
  output logic                    upd,
  output logic signed [WIDTH-1:0] x_d,
  output logic signed [WIDTH-1:0] y_d,
  output logic                    wrap,
  output logic signed [WIDTH-1:0] x,
  output logic signed [WIDTH-1:0] y
);

  // F lies within about +-2R; a candidate can reach about +-4R.
  localparam int unsigned FW = WIDTH + 3;

  logic signed [FW-1:0] f_q;      // LastF
  logic signed [FW-1:0] pdfx_q;   // 2x
  logic signed [FW-1:0] pdfy_q;   // 2y

  logic                 dx_neg, dy_neg;   // dx = -1 / dy = -1
  logic signed [FW-1:0] nfx, nfy;         // NextFx, NextFy
  logic        [FW-1:0] abs_nfx, abs_nfy;
  logic signed [FW-1:0] f_d, pdfx_d, pdfy_d;

  always_comb begin
    dx_neg = ~y[WIDTH-1];   // y >= 0 -> move towards -x
    dy_neg =  x[WIDTH-1];   // x <  0 -> move towards -y
    // NextF = LastF + PDF*delta + 1, delta = +-1
    nfx = dx_neg ? (f_q - pdfx_q + FW'(1)) : (f_q + pdfx_q + FW'(1));
    nfy = dy_neg ? (f_q - pdfy_q + FW'(1)) : (f_q + pdfy_q + FW'(1));
    abs_nfx = nfx[FW-1] ? FW'(-nfx) : FW'(nfx);
    abs_nfy = nfy[FW-1] ? FW'(-nfy) : FW'(nfy);
    dir = (abs_nfx < abs_nfy) ? STEP_X : STEP_Y;
  end

  always_comb begin
    upd    = restart | step_en;
    x_d    = x;
    y_d    = y;
    f_d    = f_q;
    pdfx_d = pdfx_q;
    pdfy_d = pdfy_q;
    if (restart) begin
      x_d    = WIDTH'({1'b0, radius});
      y_d    = '0;
      f_d    = '0;
      pdfx_d = FW'({1'b0, radius, 1'b0});
      pdfy_d = '0;
    end else if (step_en) begin
      if (dir == STEP_X) begin
        x_d    = dx_neg ? x - WIDTH'(1) : x + WIDTH'(1);
        pdfx_d = dx_neg ? pdfx_q - FW'(2) : pdfx_q + FW'(2);
        f_d    = nfx;
      end else begin
        y_d    = dy_neg ? y - WIDTH'(1) : y + WIDTH'(1);
        pdfy_d = dy_neg ? pdfy_q - FW'(2) : pdfy_q + FW'(2);
        f_d    = nfy;
      end
    end
    wrap = step_en & ~restart & (y_d == '0) & ~x_d[WIDTH-1] & (x_d != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x      <= '0;
      y      <= '0;
      f_q    <= '0;
      pdfx_q <= '0;
      pdfy_q <= '0;
    end else if (upd) begin
      x      <= x_d;
      y      <= y_d;
      f_q    <= f_d;
      pdfx_q <= pdfx_d;
      pdfy_q <= pdfy_d;
    end
  end

  // The derivative registers are always twice the coordinates.
  a_pdf_tracks_xy: assert property (@(posedge clk) disable iff (!rst_n)
    (pdfx_q == FW'(2 * FW'(x))) && (pdfy_q == FW'(2 * FW'(y))));

endmodule
