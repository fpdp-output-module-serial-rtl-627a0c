// tb_foms_line_monitor -- behavioural checker for one FOMS serial line.
//
// Samples the line on every rising clk edge (the bench clock that also runs
// the transmitter, H clocks per half-bit). A high run of at least 2.5
// half-bits followed by a low sample marks the start of the sync-low field;
// the monitor then takes the middle of each half-bit of the 17 data/parity
// bits, checks that the two halves differ, that the sync-low field is low
// and that the parity is odd, and reports the frame: 'frames' counts good
// frames, 'errors' bad ones, 'last' holds the latest good payload and
// 'last_start' the cycle (count of clk edges) at which its sync high began.
//
// It follows the specified frame format only and shares no code with the
// RTL decoder.
module tb_foms_line_monitor #(
  parameter int H = 8
) (
  input  logic        clk,
  input  logic        line,
  output logic [15:0] last,
  output int          frames,
  output int          errors,
  output longint      last_start
);
  longint cyc = 0;
  int     hi_run = 0;
  logic   prev = 0;

  initial begin
    frames = 0; errors = 0; last = '0; last_start = 0;
  end

  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (prev && !line && hi_run >= (5 * H) / 2) begin
      grab(cyc - hi_run);
      hi_run = 0;         // the run before the frame is used up
    end else begin
      hi_run = line ? hi_run + 1 : 0;
    end
    prev = line;
  end

  task automatic grab(input longint t_start);
    logic [16:0] f;
    logic a, b;
    bit ok;
    ok = 1;
    f = '0;
    // now at offset 0 of the sync-low field
    repeat ((3 * H) / 2) @(posedge clk);
    if (line) ok = 0;
    repeat ((3 * H) / 2 + H / 2) @(posedge clk);
    for (int k = 0; k < 17; k++) begin
      a = line;
      repeat (H) @(posedge clk);
      b = line;
      if (a == b) ok = 0;
      f = {f[15:0], b};
      if (k < 16) repeat (H) @(posedge clk);
    end
    if (ok && (^f) == 1'b1) begin
      frames++;
      last = f[16:1];
      last_start = t_start;
    end else begin
      errors++;
    end
  endtask
endmodule
