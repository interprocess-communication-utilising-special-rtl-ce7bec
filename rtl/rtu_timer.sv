// rtu_timer -- time base of the RTU.
//
// A prescaler divides the clock by TOTR (time-out timer register, cycles per
// clock tick) and emits a one-cycle tick. Ticks drive everything timed in the RTU:
// the RTU time counter RTUTCR (free-running tick count, readable by the CPUs, e.g.
// configured as a 1 us timer for measurements), the absolute timer ATCR which
// counts down from ATDR and reloads (at_event pulses at each reload), the timeouts,
// delays and periods in the process table, and one round-robin timer per CPU:
// while RRTRn is non-zero, rr_expire[n] pulses when the process on CPU n has run
// RRTRn ticks; the count restarts whenever CPU n switches process.
//
// The register names come from the document's register table; it names them but
// does not describe their behaviour, so the behaviour above is this design's
// reading of their names. A TOTR of 0 is treated as 1 (a tick every cycle).
module rtu_timer
  import rtu_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [31:0]     totr,               // cycles per tick
  input  logic [31:0]     atdr,               // absolute timer reload value, in ticks
  input  logic [15:0]     rrtr [NCPU],        // round-robin slice per CPU, 0 = off
  input  logic [NCPU-1:0] sw_pulse,           // CPU n switched process
  output logic            tick,
  output logic [31:0]     tcr,
  output logic [31:0]     atcr,
  output logic            at_event,
  output logic [NCPU-1:0] rr_expire
);

  logic [31:0] pre;
  logic [15:0] rrcnt [NCPU];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre      <= '0;
      tick     <= 1'b0;
      tcr      <= '0;
      atcr     <= '0;
      at_event <= 1'b0;
    end else begin
      if (pre + 1 >= totr) begin
        pre  <= '0;
        tick <= 1'b1;
      end else begin
        pre  <= pre + 1'b1;
        tick <= 1'b0;
      end
      at_event <= 1'b0;
      if (tick) begin
        tcr <= tcr + 1'b1;
        if (atcr <= 1) begin
          atcr     <= atdr;
          at_event <= (atdr != '0);
        end else begin
          atcr <= atcr - 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCPU; c++) rrcnt[c] <= '0;
      rr_expire <= '0;
    end else begin
      rr_expire <= '0;
      for (int c = 0; c < NCPU; c++) begin
        if (sw_pulse[c] || rrtr[c] == '0) begin
          rrcnt[c] <= '0;
        end else if (tick) begin
          if (rrcnt[c] + 1 >= rrtr[c]) begin
            rrcnt[c]     <= '0;
            rr_expire[c] <= 1'b1;
          end else begin
            rrcnt[c] <= rrcnt[c] + 1'b1;
          end
        end
      end
    end
  end

endmodule
