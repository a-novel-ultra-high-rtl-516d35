// tpm_sequencer -- timing generator for temporal-pixel-multiplexing frames.
//
// A TPM frame exposes a MASK_X x MASK_Y grid of pixel groups one after the
// other, then reads the whole array out once. The pixel at (x, y) belongs to
// group MASK_Y*(x mod MASK_X) + (y mod MASK_Y), and group g is exposed in
// phase g. To achieve this the sequencer drives four line registers:
//   * WRTY and RST (rows) carry the patterns 1 0..0 and 0 1..1 of period
//     MASK_Y and shift by one row every phase. In each phase one row in
//     MASK_Y is out of reset (integrating) and has WRITEY raised.
//   * WRTX and BIASON (columns) carry the pattern 1 0..0 of period MASK_X
//     and shift once every MASK_Y phases, a clock MASK_Y times slower.
// A pixel is written (integrate/write) only where WRITEX and WRITEY cross.
// For a 4x4 mask the patterns are 1000 and 0111 and the column clock is 4
// times slower; that case is the document's worked example.
//
// Frame sequence (state machine):
//   CLEAR  clears every shift register and latch (sr_rst, pl_rst) and the
//          row counters (rd_rst), and
//          works out where each pattern must start.
//   PRESET clocks LINES ones into the RST register (2 cycles per bit).
//          They are latched, with RST enabled, in the first LOAD cycle, so
//          every photodiode is held in reset while the patterns load.
//   LOAD   clocks LINES bits into all registers (2 cycles per bit). Line i
//          then holds bit (LINES-1-i) of the serial stream. Each stream is
//          arranged so that after loading, line i is 1 exactly when
//          i mod MASK == 0.
//   EXPOSE MASK_X*MASK_Y phases of t_phase cycles. In cycle 0 of a phase,
//          PL_CLK shows the new row pattern (and, every MASK_Y phases, the
//          new column pattern). WRTY_ENABLE is high for cycles
//          [wr_start, wr_end). The next bit is shifted in at the end of
//          the phase: sr_clkin is high in cycle t_phase-2 and falls going
//          into cycle t_phase-1.
//   RD_CLR / READ  disable all line registers (storage nodes are isolated),
//          clear the row counter and keep each SELECT row on for t_row
//          cycles, stepping with rd_clk.
//   DONE   pulse frame_done; then go idle, or, while `continuous` is
//          high, start the next frame with the same configuration.
// The cycle positions of PL_CLK, SR_CLKIN and ENABLE inside a phase, the
// readout timing and the load procedure are this design's own choices. The
// document's waveforms show the order (shift, then latch, with a write
// pulse inside each phase) but print no cycle numbers.
//
// Every control output is a flop, so the shift and latch clocks it makes
// are free of glitches. Status outputs pass through the same flop stage and
// line up with the controls. Configuration is sampled on `start`.
// Legal values: 1 <= mask <= MAX_MASK, t_phase >= 3, wr_end <= t_phase,
// t_row >= 2. mask_y = 1 is only allowed with mask_x = 1: the row RST lines
// are the only reset, so with a single row group no reset would separate
// the column groups' exposures.
`timescale 1ns / 1ps
module tpm_sequencer
  import tpm_pkg::*;
#(
  parameter int unsigned LINES    = LINES_DEFAULT,
  parameter int unsigned MAX_MASK = 16,
  parameter int unsigned TW       = 16,                      // timing counter width
  localparam int unsigned MW      = $clog2(MAX_MASK + 1),    // mask size width
  localparam int unsigned LW      = $clog2(LINES)            // line index width
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration, sampled when start is high in IDLE
  input  logic              start,
  input  logic              continuous,
  input  logic [MW-1:0]     mask_x,
  input  logic [MW-1:0]     mask_y,
  input  logic [TW-1:0]     t_phase,
  input  logic [TW-1:0]     wr_start,
  input  logic [TW-1:0]     wr_end,
  input  logic [TW-1:0]     t_row,
  // line-register and read-block controls
  output reg_ctrl_t         wrtx_ctrl,   // also drives the BIASON registers
  output reg_ctrl_t         wrty_ctrl,
  output reg_ctrl_t         rst_ctrl,
  output rd_ctrl_t          rd_ctrl,
  // status
  output logic              busy,
  output logic              loading,
  output logic              exposing,
  output logic              reading,
  output logic [2*MW-1:0]   subframe,    // group being exposed
  output logic              frame_done
);

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_PRESET, S_LOAD, S_EXPOSE, S_RD_CLR, S_READ, S_DONE} state_t;

  state_t            state;
  logic [MW-1:0]     mx, my;               // latched mask size
  logic [TW-1:0]     tph, wst, wen, trow;  // latched timing
  logic [MW-1:0]     cx, cy;               // serial-pattern position counters
  logic [MW-1:0]     kx, ky;               // current column / row group
  logic [2*MW-1:0]   sub;                  // current group number
  logic [LW-1:0]     n;                    // load bit count / readout row
  logic [TW-1:0]     c;                    // cycle within a phase or row
  logic              half;                 // load: 0 = clock high, 1 = clock low

  wire last_group = (ky == my - 1'b1) && (kx == mx - 1'b1);
  wire phase_end  = (c == tph - 1'b1);
  wire col_step   = (ky == my - 1'b1);     // WRTX/BIASON move after this phase

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      mx <= MW'(1); my <= MW'(1);
      tph <= '0; wst <= '0; wen <= '0; trow <= '0;
      cx <= '0; cy <= '0; kx <= '0; ky <= '0; sub <= '0;
      n <= '0; c <= '0; half <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          mx <= mask_x; my <= mask_y;
          tph <= t_phase; wst <= wr_start; wen <= wr_end; trow <= t_row;
          state <= S_CLEAR;
        end
        S_CLEAR: begin
          // Position of the first serial bit: line LINES-1 must get
          // ((LINES-1) mod MASK == 0).
          cx <= MW'((LINES - 1) % 32'(mx));
          cy <= MW'((LINES - 1) % 32'(my));
          n <= '0; half <= 1'b0;
          state <= S_PRESET;
        end
        S_PRESET: begin
          half <= ~half;
          if (half) begin
            n <= n + 1'b1;
            if (32'(n) == LINES - 1) begin
              n <= '0;
              state <= S_LOAD;
            end
          end
        end
        S_LOAD: begin
          half <= ~half;
          if (half) begin
            cx <= (cx == '0) ? mx - 1'b1 : cx - 1'b1;
            cy <= (cy == '0) ? my - 1'b1 : cy - 1'b1;
            n  <= n + 1'b1;
            if (32'(n) == LINES - 1) begin
              n <= '0;
              state <= S_EXPOSE;
              c <= '0; kx <= '0; ky <= '0; sub <= '0;
            end
          end
        end
        S_EXPOSE: begin
          c <= c + 1'b1;
          if (phase_end) begin
            c <= '0;
            if (last_group) begin
              state <= S_RD_CLR;
            end else begin
              sub <= sub + 1'b1;
              cy  <= (cy == '0) ? my - 1'b1 : cy - 1'b1;
              if (col_step) begin
                ky <= '0;
                kx <= kx + 1'b1;
                cx <= (cx == '0) ? mx - 1'b1 : cx - 1'b1;
              end else begin
                ky <= ky + 1'b1;
              end
            end
          end
        end
        S_RD_CLR: begin
          n <= '0; c <= '0;
          state <= S_READ;
        end
        S_READ: begin
          c <= c + 1'b1;
          if (c == trow - 1'b1) begin
            c <= '0;
            n <= n + 1'b1;
            if (32'(n) == LINES - 1) state <= S_DONE;
          end
        end
        S_DONE: state <= continuous ? S_CLEAR : S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------- next control outputs
  reg_ctrl_t nx_x, nx_y, nx_r;
  rd_ctrl_t  nx_rd;

  always_comb begin
    nx_x  = REG_CTRL_IDLE;
    nx_y  = REG_CTRL_IDLE;
    nx_r  = REG_CTRL_IDLE;
    nx_rd = RD_CTRL_IDLE;
    // Serial data: a 1 starts each period of the pattern; RST gets the inverse.
    nx_x.sr_din = (cx == '0);
    nx_y.sr_din = (cy == '0);
    nx_r.sr_din = (cy != '0);
    unique case (state)
      S_CLEAR: begin
        nx_x.sr_rst = 1'b1; nx_x.pl_rst = 1'b1;
        nx_y.sr_rst = 1'b1; nx_y.pl_rst = 1'b1;
        nx_r.sr_rst = 1'b1; nx_r.pl_rst = 1'b1;
        nx_rd.rd_rst = 1'b1;
      end
      S_PRESET: begin
        // All ones into the RST register, latched at the end: every row
        // is held in reset while the patterns are loaded.
        nx_r.sr_din   = 1'b1;
        nx_r.sr_clkin = ~half;
      end
      S_LOAD: begin
        nx_r.enable   = 1'b1;
        nx_r.pl_clk   = (n == '0) && !half;   // latch the all-ones preset
        nx_x.sr_clkin = ~half;
        nx_y.sr_clkin = ~half;
        nx_r.sr_clkin = ~half;
      end
      S_EXPOSE: begin
        nx_x.enable   = 1'b1;
        nx_r.enable   = 1'b1;
        nx_y.enable   = (c >= wst) && (c < wen);
        nx_y.pl_clk   = (c == '0);
        nx_r.pl_clk   = (c == '0);
        nx_x.pl_clk   = (c == '0) && (ky == '0);
        nx_y.sr_clkin = (c == tph - TW'(2)) && !last_group;
        nx_r.sr_clkin = (c == tph - TW'(2)) && !last_group;
        nx_x.sr_clkin = (c == tph - TW'(2)) && !last_group && col_step;
      end
      S_RD_CLR: nx_rd.rd_rst = 1'b1;
      S_READ: begin
        nx_rd.rd_enable = 1'b1;
        nx_rd.rd_clk    = (c == '0) && (n != '0);
      end
      default: ;
    endcase
  end

  // ----------------------------------------------------- output flop stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wrtx_ctrl <= REG_CTRL_IDLE; wrty_ctrl <= REG_CTRL_IDLE; rst_ctrl <= REG_CTRL_IDLE;
      rd_ctrl <= RD_CTRL_IDLE;
      busy <= 1'b0; loading <= 1'b0; exposing <= 1'b0; reading <= 1'b0;
      subframe <= '0; frame_done <= 1'b0;
    end else begin
      wrtx_ctrl  <= nx_x;
      wrty_ctrl  <= nx_y;
      rst_ctrl   <= nx_r;
      rd_ctrl    <= nx_rd;
      busy       <= (state != S_IDLE);
      loading    <= (state == S_LOAD);
      exposing   <= (state == S_EXPOSE);
      reading    <= (state == S_READ);
      subframe   <= sub;
      frame_done <= (state == S_DONE);
    end
  end

  // -------------------------------------------------------- configuration
  property p_legal_cfg;
    @(posedge clk) disable iff (!rst_n)
      (state == S_IDLE && start) |->
        (mask_x != '0 && 32'(mask_x) <= MAX_MASK && mask_y != '0 && 32'(mask_y) <= MAX_MASK &&
         t_phase >= TW'(3) && wr_end <= t_phase && wr_start <= wr_end && t_row >= TW'(2) &&
         (mask_y != MW'(1) || mask_x == MW'(1)));
  endproperty
  a_legal_cfg: assert property (p_legal_cfg) else $error("tpm_sequencer: illegal configuration");

endmodule
