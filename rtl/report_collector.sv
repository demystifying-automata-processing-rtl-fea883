// report_collector: gathers the matches of the report elements over a window
// of N_INPUTS input characters and ships them off chip over OUT_PINS output
// pins.
//
// During a window, every consumed character's report vector is ORed into a
// sticky match vector (one bit per report element: "this element reported
// at least once in the window"). When the N_INPUTS-th character of the
// window has been processed, the sticky vector is sent out least
// significant bits first, OUT_PINS bits per cycle, in
// OUT_CYCLES = ceil(N_REP / OUT_PINS) cycles, and input is stalled for those
// cycles. A window therefore takes N_INPUTS + OUT_CYCLES cycles at full
// input rate, which is the cost model of the match output step that the
// document's FPGA throughput figures assume.
//
// Interface and timing: adv is high on each cycle a character is consumed
// (in_valid and in_ready at the top). report must hold the result of the
// last consumed character from the cycle after adv until the next adv (as
// nfa_engine provides). in_ready goes low in the cycle after the last
// character of a window and stays low for OUT_CYCLES cycles; during those
// cycles out_valid is high, out_data carries one slice per cycle, and
// out_last marks the final slice. The output has no back-pressure: the
// receiver must take one slice per cycle. rst_n is an active-low
// synchronous reset.
//
// The window lengths and the pin-limited output time follow the document;
// the sticky-OR format, bit order and the absence of output back-pressure
// are this design's choices.
module report_collector #(
  parameter int unsigned N_REP    = 6,
  parameter int unsigned N_INPUTS = 65536,
  parameter int unsigned OUT_PINS = 32,
  localparam int unsigned OUT_CYCLES = (N_REP + OUT_PINS - 1) / OUT_PINS,
  localparam int unsigned PADDED     = OUT_CYCLES * OUT_PINS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 adv,
  input  logic [N_REP-1:0]     report,
  output logic                 in_ready,
  output logic                 out_valid,
  output logic [OUT_PINS-1:0]  out_data,
  output logic                 out_last
);

  localparam int unsigned CNT_W  = $clog2(N_INPUTS + 1);
  localparam int unsigned BEAT_W = $clog2(OUT_CYCLES + 1);

  logic [CNT_W-1:0]   in_count_q;   // characters consumed in this window
  logic               fresh_q;      // report holds a not yet collected result
  logic               close_q;      // window complete, first slice this cycle
  logic               drain_q;      // sending slices 1 .. OUT_CYCLES-1
  logic [BEAT_W-1:0]  beat_q;
  logic [N_REP-1:0]   sticky_q;
  logic [PADDED-1:0]  shift_q;
  logic [N_REP-1:0]   new_rep;
  logic [PADDED-1:0]  closing;

  assign in_ready = !close_q && !drain_q;
  assign new_rep  = fresh_q ? report : '0;
  assign closing  = PADDED'(sticky_q | new_rep);

  always_comb begin
    out_valid = close_q || drain_q;
    out_data  = close_q ? closing[OUT_PINS-1:0] : shift_q[OUT_PINS-1:0];
    out_last  = close_q ? (OUT_CYCLES == 1)
                        : (drain_q && beat_q == BEAT_W'(OUT_CYCLES - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_count_q <= '0;
      fresh_q    <= 1'b0;
      close_q    <= 1'b0;
      drain_q    <= 1'b0;
      beat_q     <= '0;
      sticky_q   <= '0;
      shift_q    <= '0;
    end else begin
      fresh_q <= adv;
      if (adv) begin
        if (in_count_q == CNT_W'(N_INPUTS - 1)) begin
          in_count_q <= '0;
          close_q    <= 1'b1;
        end else begin
          in_count_q <= in_count_q + CNT_W'(1);
        end
      end

      if (close_q) begin
        close_q  <= 1'b0;
        sticky_q <= '0;
        shift_q  <= closing >> OUT_PINS;
        beat_q   <= BEAT_W'(1);
        drain_q  <= (OUT_CYCLES > 1);
      end else begin
        sticky_q <= sticky_q | new_rep;
        if (drain_q) begin
          shift_q <= shift_q >> OUT_PINS;
          beat_q  <= beat_q + BEAT_W'(1);
          if (beat_q == BEAT_W'(OUT_CYCLES - 1)) drain_q <= 1'b0;
        end
      end
    end
  end

  // a character is never consumed while the window is being sent out
  a_no_adv_while_sending: assert property (@(posedge clk) disable iff (!rst_n)
      (close_q || drain_q) |-> !adv);

endmodule
