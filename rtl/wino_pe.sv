// Winograd PE: one input channel against one filter, for 2D F(2x2,3x3) and
// 3D F(2x2x2,3x3x3) alike.
//
// Input transform: TX units first on the 4 columns, then on the 4 rows of
// every depth plane (2D transform), then, in 3D mode, on the 16 depth
// vectors (the rotated tile). The filter goes through TW units the same way
// (3 columns, 4 rows, 16 depth vectors). Both transforms are combinational
// on the held tile. The EWMU has 16 multipliers: a 2D tile is one plane, a
// 3D tile is multiplied as four 4x4 planes on four consecutive cycles, chosen
// by `plane`. Each product plane goes through the 2D output transform (TM on
// columns, then rows) and is divided by 4 (exact: it removes the x2 per
// dimension kept by TW). The depth direction of the 3D output transform is
// linear and is finished in the ACCU by accumulating the plane results.
//
// Timing: `valid`, `plane` and the tile inputs in cycle t give `out_valid`,
// `out_plane` and `out` in cycle t+3 (transform register, EWMU, TM register).
// A new plane can be accepted every cycle.
// The TX/TW/EWMU/TM structure and the column / row / rotated-depth order of
// the transforms follow the published PE; the pipeline registers and the
// split of the 3D output transform between PE and ACCU are this design's.
module wino_pe
  import wino_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     valid,
  input  logic     mode3d,
  input  logic [1:0] plane,
  input  in_tile_t in_tile,
  input  w_tile_t  w_tile,
  output logic     out_valid,
  output logic [1:0] out_plane,
  output plane2_t  out
);
  // ---------------- input transform ----------------
  localparam int unsigned X1 = DATA_W + 1, X2 = DATA_W + 2;
  logic signed [X1-1:0] xc [4][4][4];  // after column TX  [z][r][c]
  logic signed [X2-1:0] xr [4][4][4];  // after row TX     [z][r][c]
  xt_t                  xd [4][4][4];  // after depth TX   [z][r][c]

  for (genvar z = 0; z < 4; z++) begin : g_xz
    for (genvar c = 0; c < 4; c++) begin : g_xcol
      logic signed [DATA_W-1:0] vi [4];
      logic signed [X1-1:0]     vo [4];
      for (genvar k = 0; k < 4; k++) begin : g_k
        assign vi[k] = in_tile[z][k][c];
        assign xc[z][k][c] = vo[k];
      end
      trans_x #(.W(DATA_W)) u_tx (.x(vi), .y(vo));
    end
    for (genvar r = 0; r < 4; r++) begin : g_xrow
      logic signed [X2-1:0] vo [4];
      for (genvar k = 0; k < 4; k++) begin : g_k
        assign xr[z][r][k] = vo[k];
      end
      trans_x #(.W(X1)) u_tx (.x(xc[z][r]), .y(vo));
    end
  end
  for (genvar r = 0; r < 4; r++) begin : g_xdr
    for (genvar c = 0; c < 4; c++) begin : g_xdc
      logic signed [X2-1:0] vi [4];
      xt_t                  vo [4];
      for (genvar k = 0; k < 4; k++) begin : g_k
        assign vi[k] = xr[k][r][c];
        assign xd[k][r][c] = vo[k];
      end
      trans_x #(.W(X2)) u_tx (.x(vi), .y(vo));
    end
  end

  // ---------------- filter transform ----------------
  localparam int unsigned W1 = DATA_W + 2, W2 = DATA_W + 4;
  logic signed [W1-1:0] wc [3][4][3];  // after column TW  [z][r][c]
  logic signed [W2-1:0] wr [3][4][4];  // after row TW     [z][r][c]
  wt_t                  wd [4][4][4];  // after depth TW   [z][r][c]

  for (genvar z = 0; z < 3; z++) begin : g_wz
    for (genvar c = 0; c < 3; c++) begin : g_wcol
      logic signed [DATA_W-1:0] vi [3];
      logic signed [W1-1:0]     vo [4];
      for (genvar k = 0; k < 3; k++) begin : g_ki
        assign vi[k] = w_tile[z][k][c];
      end
      for (genvar k = 0; k < 4; k++) begin : g_ko
        assign wc[z][k][c] = vo[k];
      end
      trans_w #(.W(DATA_W)) u_tw (.w(vi), .y(vo));
    end
    for (genvar r = 0; r < 4; r++) begin : g_wrow
      logic signed [W2-1:0] vo [4];
      for (genvar k = 0; k < 4; k++) begin : g_k
        assign wr[z][r][k] = vo[k];
      end
      trans_w #(.W(W1)) u_tw (.w(wc[z][r]), .y(vo));
    end
  end
  for (genvar r = 0; r < 4; r++) begin : g_wdr
    for (genvar c = 0; c < 4; c++) begin : g_wdc
      logic signed [W2-1:0] vi [3];
      wt_t                  vo [4];
      for (genvar k = 0; k < 3; k++) begin : g_ki
        assign vi[k] = wr[k][r][c];
      end
      for (genvar k = 0; k < 4; k++) begin : g_ko
        assign wd[k][r][c] = vo[k];
      end
      trans_w #(.W(W2)) u_tw (.w(vi), .y(vo));
    end
  end

  // ---------------- stage 1: select and register one plane ----------------
  xt_t        xs [16];
  wt_t        ws [16];
  logic       v1, v2, v3;
  logic [1:0] p1, p2, p3;

  always_ff @(posedge clk) begin
    if (valid) begin
      for (int r = 0; r < 4; r++) begin
        for (int c = 0; c < 4; c++) begin
          if (mode3d) begin
            xs[r*4+c] <= xd[plane][r][c];
            ws[r*4+c] <= wd[plane][r][c];
          end else begin
            // 2D: plane 0 of the 2D transform; the x2 factor of the
            // missing depth TW is not applied, so the PE scale is 4.
            xs[r*4+c] <= xt_t'(xr[0][r][c]);
            ws[r*4+c] <= wt_t'(wr[0][r][c]);
          end
        end
      end
    end
  end

  // ---------------- stage 2: EWMU ----------------
  prod_t pm [16];
  ewmu #(.N(16)) u_ewmu (.clk(clk), .en(v1), .x(xs), .w(ws), .p(pm));

  // ---------------- stage 3: 2D output transform ----------------
  localparam int unsigned M1 = P_W + 2, M2 = P_W + 4;
  logic signed [M1-1:0] mc [2][4];   // after column TM [r][c]
  logic signed [M2-1:0] mr [2][2];   // after row TM    [r][c]
  for (genvar c = 0; c < 4; c++) begin : g_mcol
    prod_t                vi [4];
    logic signed [M1-1:0] vo [2];
    for (genvar k = 0; k < 4; k++) begin : g_ki
      assign vi[k] = pm[k*4+c];
    end
    for (genvar k = 0; k < 2; k++) begin : g_ko
      assign mc[k][c] = vo[k];
    end
    trans_m #(.W(P_W)) u_tm (.s(vi), .y(vo));
  end
  for (genvar r = 0; r < 2; r++) begin : g_mrow
    trans_m #(.W(M1)) u_tm (.s(mc[r]), .y(mr[r]));
  end

  always_ff @(posedge clk) begin
    if (v2) begin
      for (int r = 0; r < 2; r++)
        for (int c = 0; c < 2; c++)
          out[r][c] <= acc_t'(mr[r][c]) >>> 2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, v2, v3} <= '0;
      {p1, p2, p3} <= '0;
    end else begin
      v1 <= valid; v2 <= v1; v3 <= v2;
      p1 <= plane; p2 <= p1; p3 <= p2;
    end
  end
  assign out_valid = v3;
  assign out_plane = p3;
endmodule
