// dcm_model - behavioural model of a DCM_ADV frequency synthesizer with its
// dynamic reconfiguration port and a global clock buffer with enable.
//
// Not synthesizable; for simulation only. A DRP write (den and dwe high) to
// address 0x50 stores {M-1, D-1}; drdy answers DRP_LAT clocks later. While rst
// is high, locked is low and no clock is produced. LOCK_CYCLES reference
// clocks after rst falls locked rises, unless lock_ok is low (the supply is too
// low for the DCM to lock). clk_out runs at REF_KHZ * M / D while locked;
// user_clk is clk_out gated by clk_en (the clock buffer enable).
module dcm_model #(
  parameter int REF_KHZ     = 100_000,
  parameter int DRP_LAT     = 3,
  parameter int LOCK_CYCLES = 200
) (
  input  logic        dclk,
  input  logic        rst,
  input  logic        den,
  input  logic        dwe,
  input  logic [6:0]  daddr,
  input  logic [15:0] di,
  output logic        drdy,
  output logic        locked,
  input  logic        lock_ok,
  input  logic        clk_en,
  output logic        user_clk,
  output int          f_khz          // frequency of clk_out, 0 when not locked
);
  int m = 2, d = 1;
  int lock_cnt = 0;
  int drp_cnt  = 0;
  logic clk_out = 1'b0;

  initial begin
    drdy = 1'b0; locked = 1'b0;
  end

  always @(posedge dclk) begin
    drdy <= 1'b0;
    if (den) begin
      drp_cnt <= DRP_LAT;
      if (dwe && daddr == 7'h50) begin
        m <= int'(di[15:8]) + 1;
        d <= int'(di[7:0]) + 1;
      end
    end else if (drp_cnt > 0) begin
      drp_cnt <= drp_cnt - 1;
      if (drp_cnt == 1) drdy <= 1'b1;
    end
    if (rst) begin
      locked   <= 1'b0;
      lock_cnt <= LOCK_CYCLES;
    end else if (!locked) begin
      if (lock_cnt > 0) lock_cnt <= lock_cnt - 1;
      else if (lock_ok) locked <= 1'b1;
    end
  end

  assign f_khz = locked ? (REF_KHZ * m) / d : 0;

  // clock generator: half period in ns = 5e5 / f_khz (time unit 1 ns)
  initial begin
    forever begin
      if (locked) begin
        #(500_000.0 / real'(REF_KHZ * m / d)) clk_out = ~clk_out;
      end else begin
        clk_out = 1'b0;
        @(posedge locked);
      end
    end
  end

  logic en_latched = 1'b0;
  always @(negedge clk_out or negedge locked) en_latched <= clk_en && locked;
  assign user_clk = clk_out && en_latched;
endmodule
