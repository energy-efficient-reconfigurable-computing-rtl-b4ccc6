// lsu - logic scaling unit: partial reconfiguration controller.
//
// Changes the user logic at run time by streaming a partial bitstream from the
// external SRAM into the FPGA's internal configuration access port (ICAP).
// The management unit gives the first SRAM word and the length in 32-bit
// words, then pulses start; the unit works on its own and pulses irq when the
// last word has been written into the ICAP.
//
// How it works: reads are issued to the pipelined SRAM one word per clock, and
// the returning words go into a small FIFO. A credit counter starts at the FIFO
// depth, is spent by every read issued and returned by every word sent on, so
// the FIFO can never overflow however long the SRAM latency is, provided
// FIFO_DEPTH exceeds SRAM_LAT + 1. The FIFO head drives the ICAP; a word is
// written in every clock in which the FIFO is not empty and icap_busy is low,
// giving the full rate of 32 bits per clock (400 MB/s at 100 MHz). When
// icap_busy is high the unit stalls: the word stays offered, the FIFO fills
// and the reads stop.
//
// Interface: start/bit_addr/bit_words, busy, irq (the clock after the last write). SRAM: sram_re and sram_addr
// in one cycle, sram_rvalid with sram_rdata SRAM_LAT cycles later. ICAP (Virtex-5
// polarity): icap_ce_n and icap_write_n low offer icap_i; taken unless icap_busy.
// Timing: without stalls a bitstream of N words takes N + SRAM_LAT + 2 clocks
// from start to irq.
//
// From the design description: bitstreams in external SRAM, start address and
// size from the management unit, autonomous transfer to the 32-bit ICAP, an
// interrupt at the end. Own choices: the FIFO and credit scheme, the SRAM
// latency, and that the SRAM already holds the words in the order and bit
// order the ICAP expects.
module lsu
  import avls_pkg::*;
#(
  parameter int unsigned SRAM_LAT   = 2,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // control from the management unit
  input  logic               start,
  input  logic [SRAM_AW-1:0] bit_addr,
  input  logic [SRAM_AW-1:0] bit_words,
  output logic               busy,
  output logic               irq,
  // external SRAM read port
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_re,
  input  logic [ICAP_W-1:0]  sram_rdata,
  input  logic               sram_rvalid,
  // ICAP
  output logic               icap_ce_n,
  output logic               icap_write_n,
  output logic [ICAP_W-1:0]  icap_i,
  input  logic               icap_busy
);

  localparam int unsigned PW = $clog2(FIFO_DEPTH);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic [SRAM_AW-1:0] rd_addr, rd_left, wr_left;
  logic [CW-1:0]      credits, count;
  logic [PW-1:0]      wr_ptr, rd_ptr;
  logic [ICAP_W-1:0]  fifo [FIFO_DEPTH];

  logic issue, push, pop;
  assign issue = busy && (rd_left != '0) && (credits != '0);
  assign push  = sram_rvalid;
  assign pop   = busy && (count != '0) && !icap_busy;

  // The FIFO head drives the ICAP directly; a word offered while icap_busy is
  // high is not taken and stays on icap_i.
  assign icap_ce_n    = !(busy && count != '0);
  assign icap_write_n = icap_ce_n;
  assign icap_i       = fifo[rd_ptr];

  assign sram_re   = issue;
  assign sram_addr = rd_addr;

  always_ff @(posedge clk) begin
    if (push) fifo[wr_ptr] <= sram_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      irq          <= 1'b0;
      rd_addr      <= '0;
      rd_left      <= '0;
      wr_left      <= '0;
      credits      <= CW'(FIFO_DEPTH);
      count        <= '0;
      wr_ptr       <= '0;
      rd_ptr       <= '0;
    end else begin
      irq <= 1'b0;
      if (!busy) begin
        if (start && bit_words != '0) begin
          busy    <= 1'b1;
          rd_addr <= bit_addr;
          rd_left <= bit_words;
          wr_left <= bit_words;
          credits <= CW'(FIFO_DEPTH);
        end else if (start) begin
          irq <= 1'b1;                        // empty bitstream: nothing to do
        end
      end else begin
        if (issue) begin
          rd_addr <= rd_addr + 1'b1;
          rd_left <= rd_left - 1'b1;
        end
        credits <= credits - CW'(issue) + CW'(pop);
        count   <= count + CW'(push) - CW'(pop);
        if (push) wr_ptr <= (wr_ptr == PW'(FIFO_DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
        if (pop) begin
          rd_ptr       <= (rd_ptr == PW'(FIFO_DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
          wr_left      <= wr_left - 1'b1;
          if (wr_left == 1) begin
            busy <= 1'b0;
            irq  <= 1'b1;
          end
        end
      end
    end
  end

  // The FIFO must cover the SRAM read latency to keep one word per clock.
  if (FIFO_DEPTH < SRAM_LAT + 2) begin : g_depth_check
    $error("lsu: FIFO_DEPTH must be at least SRAM_LAT + 2");
  end

  // The credit scheme must keep the FIFO from overflowing.
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
    !(push && !pop && count == CW'(FIFO_DEPTH)));

endmodule
