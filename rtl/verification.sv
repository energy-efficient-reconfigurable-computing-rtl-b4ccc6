// verification - combines the in-situ detectors into one timing-violation flag.
//
// Every detector delivers an active-high ok (its main and detection flip-flops
// agree). In the user clock domain the unit ANDs all of them in one registered
// stage; any detector that disagrees makes the AND low, which sets a sticky
// violation flag. The flag is carried into the management clock domain by a
// two-flip-flop synchronizer, because the user clock is generated by the DCM
// and changes at run time. The frequency scaling unit opens an observation
// window with clear: a toggle crosses into the user domain, clears the sticky
// flag there and, after two more user clocks in which violations are ignored
// (the detector and AND registers may still hold values from before a clock
// stop), is echoed back; clear_pending stays high until the echo arrives, so a
// window never starts with a stale flag. fire is the sticky flag
// as seen in the management domain; fire_count counts the windows that ended
// (with clear) while fire was set, the "firing rate" reported to the host.
//
// Interface: clk/rst_n management domain, clk_user user domain (both reset by
// rst_n, asynchronous active low). det_ok[N_DET] from the detectors.
// Timing: a violation shows on fire 3-4 management cycles after the detector
// cycle; clear_pending lasts about four user and two management cycles.
//
// From the design description: the verification module receives the outputs
// of all detectors and ANDs them to detect any timing violation; 100 detectors.
// Own choices: the sticky flag, the clock-domain crossing and the counter.
module verification #(
  parameter int unsigned N_DET = 100,
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clk_user,
  input  logic [N_DET-1:0] det_ok,
  input  logic             clear,          // management domain, one-cycle pulse
  output logic             clear_pending,
  output logic             fire,
  output logic [CNT_W-1:0] fire_count
);

  // ---------------- user clock domain ----------------
  logic       all_ok_r;
  logic       sticky;
  logic [1:0] clr_sync;
  logic       clr_seen;       // last clear toggle taken
  logic       clr_ack;        // echoed once the detector pipeline is fresh
  logic [1:0] mask_cnt;
  logic       clr_tgl;        // management domain, defined below

  always_ff @(posedge clk_user or negedge rst_n) begin
    if (!rst_n) begin
      all_ok_r <= 1'b1;
      sticky   <= 1'b0;
      clr_sync <= '0;
      clr_seen <= 1'b0;
      clr_ack  <= 1'b0;
      mask_cnt <= '0;
    end else begin
      all_ok_r <= &det_ok;
      clr_sync <= {clr_sync[0], clr_tgl};
      if (clr_sync[1] != clr_seen) begin
        // A clear: drop the flag and ignore the next two results, which may
        // still come from detector and AND registers that held their values
        // while the user clock was stopped for a frequency change.
        clr_seen <= clr_sync[1];
        mask_cnt <= 2'd2;
        sticky   <= 1'b0;
      end else if (mask_cnt != '0) begin
        mask_cnt <= mask_cnt - 1'b1;
        sticky   <= 1'b0;
        if (mask_cnt == 2'd1) clr_ack <= clr_seen;
      end else if (!all_ok_r) begin
        sticky <= 1'b1;
      end
    end
  end

  // ---------------- management clock domain ----------------
  logic [1:0] fire_sync;
  logic [1:0] ack_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fire_sync  <= '0;
      ack_sync   <= '0;
      clr_tgl    <= 1'b0;
      fire_count <= '0;
    end else begin
      fire_sync <= {fire_sync[0], sticky};
      ack_sync  <= {ack_sync[0], clr_ack};
      if (clear) begin
        // A clear while one is still travelling is merged into it: that one
        // is taken later in the user domain anyway. (Toggling twice would
        // cancel both.)
        if (!clear_pending) clr_tgl <= ~clr_tgl;
        if (fire && fire_count != '1) fire_count <= fire_count + 1'b1;
      end
    end
  end

  assign clear_pending = (clr_tgl != ack_sync[1]);
  assign fire          = fire_sync[1] && !clear_pending;

endmodule
