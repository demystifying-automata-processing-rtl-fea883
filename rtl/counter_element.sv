// counter_element: an NFA counter with the function of the Automata
// Processor's counter element.
//
// Each character step, the counter counts up by one if its count input is
// active, and is cleared if its reset input is active (reset wins). When
// the count reaches TARGET the output fires:
//   CNT_PULSE  fires in the one step the target is reached, then holds
//              until reset;
//   CNT_LATCH  fires from that step on, every step, until reset;
//   CNT_ROLL   fires in the step the target is reached and restarts at 0.
// The output is an activation like that of a state: it enables successor
// states for the next character and can be reported.
//
// Timing: cnt_in and rst_in hold the activations of the current character
// step; fire is combinational from them and the stored count, so it belongs
// to the same step. The stored count moves to the next step on the clock
// edge where adv is high (the next character is consumed). clear restarts
// the counter at that edge without changing the output of the current step
// (used at the start of a new input stream). rst_n is an active-low
// synchronous reset. The document names the element and says the FPGA
// engine supports it; the modes, the 12-bit width and the timing are this
// design's choice.
module counter_element
  import nfa_pkg::*;
#(
  parameter int unsigned          WIDTH  = CNT_WIDTH,
  parameter logic [WIDTH-1:0]     TARGET = WIDTH'(1),
  parameter logic [1:0]           MODE   = CNT_PULSE
) (
  input  logic clk,
  input  logic rst_n,
  input  logic adv,
  input  logic clear,
  input  logic cnt_in,
  input  logic rst_in,
  output logic fire
);

  logic [WIDTH-1:0] count_q, count_d;
  logic             done_q, done_d;
  logic             reach;

  // the count input in this step brings the count to the target
  assign reach = cnt_in && !done_q && (count_q == TARGET - WIDTH'(1));

  always_comb begin
    count_d = count_q;
    done_d  = done_q;
    fire    = 1'b0;
    if (rst_in) begin
      count_d = '0;
      done_d  = 1'b0;
    end else begin
      unique case (MODE)
        CNT_LATCH: begin
          fire = done_q || reach;
          if (reach) done_d = 1'b1;
          else if (cnt_in && !done_q) count_d = count_q + WIDTH'(1);
        end
        CNT_ROLL: begin
          fire = reach;
          if (reach) count_d = '0;
          else if (cnt_in) count_d = count_q + WIDTH'(1);
        end
        default: begin   // CNT_PULSE
          fire = reach;
          if (reach) done_d = 1'b1;
          else if (cnt_in && !done_q) count_d = count_q + WIDTH'(1);
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count_q <= '0;
      done_q  <= 1'b0;
    end else if (adv) begin
      if (clear) begin
        count_q <= '0;
        done_q  <= 1'b0;
      end else begin
        count_q <= count_d;
        done_q  <= done_d;
      end
    end
  end

endmodule
