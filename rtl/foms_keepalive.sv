// foms_keepalive -- keep-alive timer of the FOMS transmitter.
//
// When the keep-alive jumper is fitted, the module must drive its outputs to
// the safe state (the jumper-selected reset value) if no command reaches it
// within the keep-alive time, nominally 100 ms. The timer is a down-counter
// reloaded with TIMEOUT_CYCLES-1 by every accepted command (cmd_ok). When it
// reaches zero it emits a single-cycle 'timeout' pulse and stops; it starts
// again with the next command. The time is a parameter, standing in for the
// value compiled into the CPLD; 100 ms at the 50 MHz system clock assumed
// here is 5,000,000 cycles. Restarting on power-up/reset (so that a module
// that never receives a command also falls to the safe state) and the
// one-shot behaviour are this design's choices.
//
// Interface: enable is the jumper (JMPR 3 1-2); with it open, timeout never
// fires. Timing: timeout pulses exactly TIMEOUT_CYCLES clock cycles after the
// last cmd_ok (or after reset). Reset asynchronous, active low.
module foms_keepalive #(
  parameter int unsigned TIMEOUT_CYCLES = 5_000_000   // 100 ms at 50 MHz
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic cmd_ok,
  output logic timeout
);
  localparam int unsigned CW = $clog2(TIMEOUT_CYCLES + 1);

  logic [CW-1:0] count;
  logic          running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= CW'(TIMEOUT_CYCLES - 1);
      running <= 1'b1;
      timeout <= 1'b0;
    end else begin
      timeout <= 1'b0;
      if (cmd_ok) begin
        count   <= CW'(TIMEOUT_CYCLES - 1);
        running <= 1'b1;
      end else if (running) begin
        if (count == '0) begin
          running <= 1'b0;
          timeout <= enable;
        end else begin
          count <= count - 1'b1;
        end
      end
    end
  end

endmodule
