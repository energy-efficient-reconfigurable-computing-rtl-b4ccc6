// avls_mgmt - AVLS management unit: sequences logic, voltage and frequency.
//
// A request (avls_pkg::avls_req_t) names an optional partial bitstream and a
// target core-supply code. The unit first has the logic scaling unit load the
// bitstream into the user-logic region and waits for its completion interrupt,
// then has the voltage scaling unit move the supply, and finally starts the
// frequency scaling unit, which finds the highest clock the in-situ detectors
// accept at that voltage. It then enters MG_RUN: the user logic runs and the
// frequency scaling unit may track (step down) if the detectors fire later.
// Capacitance (amount of logic), voltage and frequency are thus adapted in
// that order for every request.
//
// Interface: req_valid/req_ready/req (taken in MG_IDLE or MG_RUN); done pulses
// when a request has been served, with fail copied from the frequency scaling
// unit (no working frequency at that voltage); state for the monitor. Towards
// the units: one-cycle start/set/search pulses and their completion pulses.
// Timing: a request takes the sum of the three units' times plus a few
// cycles; while one is served req_ready is low.
//
// From the design description: the management unit configures the requested
// user design through the logic scaling unit and the ICAP, is told by an
// interrupt when this has completed, after which voltage and frequency
// adaptation start; the frequency search runs once a voltage has been set.
// Own choices: the request format, and that a request may skip reconfiguration.
module avls_mgmt
  import avls_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // request interface
  input  logic          req_valid,
  output logic          req_ready,
  input  avls_req_t     req,
  output logic          done,
  output logic          fail,
  output mgmt_state_e   state,
  // logic scaling unit
  output logic               lsu_start,
  output logic [SRAM_AW-1:0] lsu_addr,
  output logic [SRAM_AW-1:0] lsu_words,
  input  logic               lsu_irq,
  // voltage scaling unit
  output logic               vsu_set,
  output logic [VCODE_W-1:0] vsu_code,
  input  logic               vsu_done,
  // frequency scaling unit
  output logic          fsu_search,
  output logic          fsu_track,
  input  logic          fsu_done,
  input  logic          fsu_fail
);

  avls_req_t cur;

  assign req_ready = (state == MG_IDLE) || (state == MG_RUN);
  assign lsu_addr  = cur.bit_addr;
  assign lsu_words = cur.bit_words;
  assign vsu_code  = cur.vcode;
  assign fsu_track = (state == MG_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= MG_IDLE;
      cur        <= '0;
      lsu_start  <= 1'b0;
      vsu_set    <= 1'b0;
      fsu_search <= 1'b0;
      done       <= 1'b0;
      fail       <= 1'b0;
    end else begin
      lsu_start  <= 1'b0;
      vsu_set    <= 1'b0;
      fsu_search <= 1'b0;
      done       <= 1'b0;
      unique case (state)
        MG_IDLE, MG_RUN: if (req_valid) begin
          cur   <= req;
          state <= req.reconfig ? MG_RECONFIG : MG_VOLTAGE;
        end
        MG_RECONFIG: begin
          lsu_start <= 1'b1;
          state     <= MG_WAIT_IRQ;
        end
        MG_WAIT_IRQ: if (lsu_irq) state <= MG_VOLTAGE;
        MG_VOLTAGE: begin
          vsu_set <= 1'b1;
          state   <= MG_WAIT_V;
        end
        MG_WAIT_V: if (vsu_done) state <= MG_FREQ;
        MG_FREQ: begin
          fsu_search <= 1'b1;
          state      <= MG_WAIT_F;
        end
        MG_WAIT_F: if (fsu_done) begin
          fail  <= fsu_fail;
          done  <= 1'b1;
          state <= MG_RUN;
        end
        default: state <= MG_IDLE;
      endcase
    end
  end

  // Each unit is started only from its own state.
  a_start_order : assert property (@(posedge clk) disable iff (!rst_n)
    lsu_start |-> $past(state) == MG_RECONFIG);

endmodule
