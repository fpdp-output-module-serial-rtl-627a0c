// foms_status_leds -- front-panel LED driver of the FOMS transmitter.
//
// Sixteen LEDs, listed here from the top of the panel down, map onto
// led[15:0] (led[15] is the top one):
//   led[15:13] GA2..GA0   group address switch (yellow)
//   led[12:8]  MA4..MA0   module address switch (yellow)
//   led[7]     Pwr        power on (green), follows power_ok
//   led[6]     Bus        FPDP bus active (green)
//   led[5]     Mod        module addressed (green)
//   led[4]     Load       shift-register outputs loaded (green)
//   led[3]     Prty       FPDP parity error, latched (red)
//   led[2]     FIFO       FIFO overflow, latched (red)
//   led[1]     Vlt        power supply fault, latched (red)
//   led[0]     Adr        group address fault, latched (red)
// The three activity LEDs are pulse stretchers: each event re-arms a counter
// that holds the LED on for STRETCH_CYCLES clock cycles so that single-cycle
// events are visible. The four fault LEDs latch on their event and stay on
// until the LATCH RESET button (latch_clr) or a module reset. The LED
// assignment follows the specification; the stretch time (default 2^21
// cycles, about 42 ms at 50 MHz) is this design's choice. Outputs are
// active high (1 = LED lit).
//
// Timing: an event lights its LED on the next clock edge.
// Reset asynchronous, active low, turns every latched and stretched LED off.
module foms_status_leds #(
  parameter int unsigned STRETCH_CYCLES = 2_097_152
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        latch_clr,
  input  logic [2:0]  group_addr,
  input  logic [4:0]  module_addr,
  input  logic        power_ok,
  input  logic        bus_evt,
  input  logic        mod_evt,
  input  logic        load_evt,
  input  logic        parity_evt,
  input  logic        fifo_ovf_evt,
  input  logic        vfault_evt,
  input  logic        addr_fault_evt,
  output logic [15:0] led
);
  localparam int unsigned CW = $clog2(STRETCH_CYCLES + 1);

  logic [2:0]    act_evt, act_on;
  logic [CW-1:0] act_cnt [3];
  logic [3:0]    flt_evt, flt_latched;

  assign act_evt = {bus_evt, mod_evt, load_evt};
  assign flt_evt = {parity_evt, fifo_ovf_evt, vfault_evt, addr_fault_evt};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) act_cnt[i] <= '0;
      act_on      <= '0;
      flt_latched <= '0;
    end else begin
      for (int i = 0; i < 3; i++) begin
        if (act_evt[i]) begin
          act_cnt[i] <= CW'(STRETCH_CYCLES - 1);
          act_on[i]  <= 1'b1;
        end else if (act_cnt[i] != '0) begin
          act_cnt[i] <= act_cnt[i] - 1'b1;
        end else begin
          act_on[i] <= 1'b0;
        end
      end
      // a new fault wins over a simultaneous clear
      flt_latched <= (latch_clr ? 4'b0000 : flt_latched) | flt_evt;
    end
  end

  assign led = {group_addr, module_addr, power_ok, act_on, flt_latched};

endmodule
