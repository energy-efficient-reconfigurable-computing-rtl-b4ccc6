// fsu - frequency scaling unit: finds the highest clock the user logic passes.
//
// The user clock comes from a DCM_ADV whose frequency synthesizer is set over
// its dynamic reconfiguration port (DRP). For the current index the unit reads
// the multiplier/divider pair from the frequency ROM, holds the DCM in reset,
// writes the pair to the DCM, releases reset and waits for LOCKED. Only then is
// the user clock enabled (user_clk_en drives a clock buffer enable). It then
// clears the verification unit and watches its fire flag for WINDOW_CYCLES.
//
// Search rule, started by search: while windows stay clean the index goes up
// one entry at a time; the first window in which the detectors fire marks the
// limit, the index goes down one entry, and the search ends at the first clean
// window after any firing. Starting above the limit (after the voltage was
// lowered) the index therefore walks down until the detectors are quiet. A DCM
// that does not lock within LOCK_TIMEOUT cycles counts as a firing; if it fails
// even at index 0 the search ends with fail set and the clock stays off.
// After the search, with track high, the unit keeps watching windows and
// restarts the search (downwards) if the detectors fire, for example because
// the chip warmed up.
//
// A search request is accepted in any state (a DRP write in progress is
// finished first) and restarts the search from the current index.
//
// Interface: search (pulse), track, busy, done (pulse at the end of a search),
// fail, freq_idx and freq_khz (the current setting), the verification unit
// handshake (ver_clear, ver_clear_pending, ver_fire), the DCM DRP and dcm_rst,
// dcm_locked, user_clk_en.
// Timing: one step costs 2 + DRP handshake + lock time + clear handshake +
// WINDOW_CYCLES clocks.
//
// From the design description: the ROM of DCM values, state machines writing
// them through the DCM reconfiguration port, the clock released to the user
// logic once the DCM has locked, and the frequency raised until the detectors
// fire, then held until the voltage changes. Own choices: the window length,
// the one-step back-off, the lock timeout and the tracking after the search.
module fsu
  import avls_pkg::*;
#(
  parameter int unsigned ROM_DEPTH     = 128,
  parameter int unsigned WINDOW_CYCLES = 1024,
  parameter int unsigned LOCK_TIMEOUT  = 100_000,
  localparam int unsigned AW           = $clog2(ROM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              search,
  input  logic              track,
  output logic              busy,
  output logic              done,
  output logic              fail,
  output logic [AW-1:0]     freq_idx,
  output logic [FKHZ_W-1:0] freq_khz,
  // verification unit
  output logic              ver_clear,
  input  logic              ver_clear_pending,
  input  logic              ver_fire,
  // DCM_ADV
  output logic              dcm_rst,
  output logic              dcm_den,
  output logic              dcm_dwe,
  output logic [6:0]        dcm_daddr,
  output logic [15:0]       dcm_di,
  input  logic              dcm_drdy,
  input  logic              dcm_locked,
  output logic              user_clk_en
);

  typedef enum logic [3:0] {
    F_IDLE, F_STEP, F_ROM, F_DRP, F_LOCK, F_CLEAR, F_WINDOW, F_EVAL, F_HOLD
  } fsu_state_e;

  localparam int unsigned WW = $clog2(WINDOW_CYCLES + 1);
  localparam int unsigned TW = $clog2(LOCK_TIMEOUT + 1);

  fsu_state_e  state;
  freq_entry_t rom_q;
  logic        fired_seen;   // the detectors fired during this search
  logic        holding;      // window opened from F_HOLD (tracking)
  logic        search_pend;  // search requested during a DRP write
  logic        win_fire;
  logic [WW-1:0] win_cnt;
  logic [TW-1:0] lock_cnt;

  freq_rom #(.DEPTH(ROM_DEPTH)) u_rom (
    .clk  (clk),
    .addr (freq_idx),
    .data (rom_q)
  );

  assign busy      = (state != F_IDLE) && (state != F_HOLD) && !holding;
  assign dcm_daddr = DCM_DFS_ADDR;
  assign dcm_dwe   = dcm_den;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= F_IDLE;
      freq_idx    <= '0;
      freq_khz    <= '0;
      fired_seen  <= 1'b0;
      holding     <= 1'b0;
      search_pend <= 1'b0;
      win_fire    <= 1'b0;
      win_cnt     <= '0;
      lock_cnt    <= '0;
      done        <= 1'b0;
      fail        <= 1'b0;
      ver_clear   <= 1'b0;
      dcm_rst     <= 1'b0;
      dcm_den     <= 1'b0;
      dcm_di      <= '0;
      user_clk_en <= 1'b0;
    end else begin
      done      <= 1'b0;
      ver_clear <= 1'b0;
      dcm_den   <= 1'b0;
      if ((search || search_pend) && state != F_DRP) begin
        // a new search also ends a search or tracking window in progress;
        // a DRP write already started is completed first
        search_pend <= 1'b0;
        fired_seen <= 1'b0;
        holding    <= 1'b0;
        fail       <= 1'b0;
        state      <= F_STEP;
      end else begin
        if (search) search_pend <= 1'b1;
        unique case (state)
        F_IDLE, F_HOLD: begin
          if (state == F_HOLD && track && !fail) begin
            holding   <= 1'b1;
            ver_clear <= 1'b1;
            state     <= F_CLEAR;
          end
        end
        F_STEP: state <= F_ROM;               // ROM reads the new index
        F_ROM: begin                          // rom_q is valid now
          user_clk_en <= 1'b0;
          dcm_rst     <= 1'b1;
          dcm_den     <= 1'b1;
          dcm_di      <= {rom_q.m_minus1, rom_q.d_minus1};
          freq_khz    <= rom_q.f_khz;
          state       <= F_DRP;
        end
        F_DRP: if (dcm_drdy) begin
          dcm_rst  <= 1'b0;
          lock_cnt <= TW'(LOCK_TIMEOUT);
          state    <= F_LOCK;
        end
        F_LOCK: begin
          if (dcm_locked) begin
            user_clk_en <= 1'b1;
            ver_clear   <= 1'b1;
            state       <= F_CLEAR;
          end else if (lock_cnt == '0) begin
            // no lock counts as a timing failure of this setting
            fired_seen <= 1'b1;
            if (freq_idx != '0) begin
              freq_idx <= freq_idx - 1'b1;
              state    <= F_STEP;
            end else begin
              fail  <= 1'b1;
              done  <= 1'b1;
              state <= F_HOLD;
            end
          end else begin
            lock_cnt <= lock_cnt - 1'b1;
          end
        end
        F_CLEAR: if (!ver_clear && !ver_clear_pending) begin
          win_cnt  <= WW'(WINDOW_CYCLES);
          win_fire <= 1'b0;
          state    <= F_WINDOW;
        end
        F_WINDOW: begin
          if (ver_fire) win_fire <= 1'b1;
          if (win_cnt == '0) state <= F_EVAL;
          else               win_cnt <= win_cnt - 1'b1;
        end
        F_EVAL: begin
          ver_clear <= 1'b1;                  // counts a fired window
          if (holding) begin
            holding <= 1'b0;
            if (win_fire) begin               // lost the margin: search down
              fired_seen <= 1'b1;
              if (freq_idx != '0) freq_idx <= freq_idx - 1'b1;
              state <= F_STEP;
            end else begin
              state <= F_HOLD;
            end
          end else if (win_fire) begin
            fired_seen <= 1'b1;
            if (freq_idx != '0) begin
              freq_idx <= freq_idx - 1'b1;
              state    <= F_STEP;
            end else begin
              done  <= 1'b1;                  // fires even at the lowest entry
              fail  <= 1'b1;
              state <= F_HOLD;
            end
          end else if (fired_seen || freq_idx == AW'(ROM_DEPTH - 1)) begin
            done  <= 1'b1;
            state <= F_HOLD;
          end else begin
            freq_idx <= freq_idx + 1'b1;
            state    <= F_STEP;
          end
        end
        default: state <= F_IDLE;
        endcase
      end
    end
  end

endmodule
