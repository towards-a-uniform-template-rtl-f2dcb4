// Computation-engine controller: the tz / tr / tc loop nest of one engine
// pass (one group of TO output channels against one group of TI input
// channels over a Tz x Tr x Tc output tile).
//
// For every 2x2 (2D) or 2x2x2 (3D) output tile position it issues a window
// read to the input buffer; the window arrives one cycle later and is handed
// to all PEs with `pe_valid`. A 2D tile takes one cycle, a 3D tile four
// (planes 0..3 of the element-wise multiplication), so a pass takes
// (Tr/2)(Tc/2) cycles in 2D and 4(Tz/2)(Tr/2)(Tc/2) cycles in 3D plus the
// pipeline latency. Finished output tiles (`tile_done`, from the ReLU/POOL
// stage) are given consecutive output-buffer addresses. `done` pulses once,
// the cycle after the last output tile has been written.
// `start` is accepted only while idle; `mode3d` is sampled at `start`.
// The tz / tr / tc loop order follows the published computation-engine loop
// nest; the timing and handshake are this design's.
module engine_ctrl #(
  parameter int unsigned TZ = 2,
  parameter int unsigned TR = 14,
  parameter int unsigned TC = 14,
  localparam int unsigned TILES = (TZ / 2) * (TR / 2) * (TC / 2),
  localparam int unsigned AW = (TILES > 1) ? $clog2(TILES) : 1,
  localparam int unsigned ZW = $clog2(TZ + 2),
  localparam int unsigned RW = $clog2(TR + 2),
  localparam int unsigned CW = $clog2(TC + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          mode3d,
  output logic          busy,
  output logic          done,
  // input buffer window read
  output logic          rd_en,
  output logic [ZW-1:0] rd_z0,
  output logic [RW-1:0] rd_r0,
  output logic [CW-1:0] rd_c0,
  // PE / PU control, aligned with the input buffer output
  output logic          pe_valid,
  output logic [1:0]    pe_plane,
  output logic [AW-1:0] pe_addr,
  output logic          mode3d_q,
  // output buffer write address
  input  logic          tile_done,
  output logic [AW-1:0] ob_addr
);
  typedef enum logic [1:0] {IDLE, RUN, DRAIN} state_t;
  state_t state;

  localparam int unsigned NZ = TZ / 2, NR = TR / 2, NC = TC / 2;
  int unsigned tz, tr, tc, pl;
  logic        last_issue;
  logic [AW-1:0] addr;

  always_comb begin
    last_issue = (pl == (mode3d_q ? 3 : 0)) && (tc == NC - 1) && (tr == NR - 1)
                 && (!mode3d_q || tz == NZ - 1);
    addr = AW'((tz * NR + tr) * NC + tc);
  end

  assign rd_en = (state == RUN);
  assign rd_z0 = ZW'(2 * tz);
  assign rd_r0 = RW'(2 * tr);
  assign rd_c0 = CW'(2 * tc);
  assign busy  = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      {tz, tr, tc, pl} <= '0;
      mode3d_q <= 1'b0;
      pe_valid <= 1'b0;
      pe_plane <= '0;
      pe_addr  <= '0;
      done     <= 1'b0;
      ob_addr  <= '0;
    end else begin
      done     <= 1'b0;
      pe_valid <= rd_en;
      pe_plane <= 2'(pl);
      pe_addr  <= addr;
      if (tile_done) ob_addr <= ob_addr + 1'b1;
      unique case (state)
        IDLE: if (start) begin
          state    <= RUN;
          mode3d_q <= mode3d;
          {tz, tr, tc, pl} <= '0;
              ob_addr  <= '0;
        end
        RUN: begin
          if (last_issue) state <= DRAIN;
          if (pl < (mode3d_q ? 3 : 0)) pl <= pl + 1;
          else begin
            pl <= 0;
            if (tc < NC - 1) tc <= tc + 1;
            else begin
              tc <= 0;
              if (tr < NR - 1) tr <= tr + 1;
              else begin
                tr <= 0;
                tz <= tz + 1;
              end
            end
          end
        end
        DRAIN: begin
          // only the last input-channel group writes output tiles, so the
          // end of a pass is found by letting the pipeline (input buffer,
          // PE, ACCU, ReLU/POOL, output buffer: 7 cycles) empty.
          if (pl == 7) begin
            state <= IDLE;
            done  <= 1'b1;
          end else pl <= pl + 1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // a start while a pass runs is a protocol error
  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == IDLE)
    else $error("engine_ctrl: start while busy");
endmodule
