// tb_foms_rx_decoder -- self-checking testbench for foms_rx_decoder.
//
// A behavioural line driver in the bench produces the FOMS serial format
// from real-time delays: sync high 1.5 bit, sync low 1.5 bit, D15..D0 and an
// odd parity bit in Manchester code ('1' = low then high), Manchester zeros
// between frames. Its half-bit is 160.1 ns, slightly off the decoder's
// 8 x 20 ns, to model two independent oscillators. Checked: random frames
// with random idle gaps (including none) are decoded with the right data;
// a frame with a wrong parity bit and a frame with a coding violation are
// rejected with frame_err and produce no frame_ok.
//
// The line format follows the specification; the decoder's error reporting
// is this design's choice.
module tb_foms_rx_decoder;
  logic clk = 0, rst_n = 0, din = 0;
  logic [15:0] data;
  logic frame_ok, frame_err;

  int checks = 0, failures = 0;
  logic [15:0] expq [$];
  int n_err = 0, n_ok = 0;

  realtime HB = 160.1ns;

  foms_rx_decoder dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(negedge clk) begin
    if (frame_ok) begin
      n_ok++;
      if (expq.size() == 0) check(0, $sformatf("unexpected frame %h", data));
      else check(data == expq.pop_front(), $sformatf("decoded %h", data));
    end
    if (frame_err) n_err++;
  end

  task automatic half(input logic v);
    din = v;
    #(HB);
  endtask

  task automatic idle_bits(input int n);
    repeat (n) begin half(1); half(0); end
  endtask

  // bad_par flips the parity bit; viol_bit >= 0 sends that bit without a mid-bit edge
  task automatic send(input logic [15:0] d, input bit bad_par = 0, input int viol_bit = -1);
    logic [16:0] f;
    f = {d, ~(^d) ^ bad_par};
    repeat (3) half(1);
    repeat (3) half(0);
    for (int i = 16; i >= 0; i--) begin
      if (16 - i == viol_bit) begin half(f[i]); half(f[i]); end
      else begin half(~f[i]); half(f[i]); end
    end
  endtask

  initial begin : watchdog
    #3ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    int e0;
    #100 rst_n = 1;
    idle_bits(5);
    for (int i = 0; i < 200; i++) begin
      d = (i < 4) ? 16'(i * 16'h5555) : 16'($urandom);
      expq.push_back(d);
      send(d);
      idle_bits($urandom_range(0, 6));
    end
    idle_bits(4);
    check(expq.size() == 0, $sformatf("%0d frames not decoded", expq.size()));
    check(n_ok == 200, $sformatf("200 frames expected, %0d decoded", n_ok));
    check(n_err == 0, $sformatf("no errors expected, saw %0d", n_err));
    e0 = n_err;
    send(16'h1234, 1);
    idle_bits(4);
    check(n_err == e0 + 1, "bad parity rejected");
    send(16'hABCD, 0, 7);
    idle_bits(4);
    check(n_err >= e0 + 2, "coding violation rejected");
    check(n_ok == 200, "no frame_ok for bad frames");
    expq.push_back(16'h8001);
    send(16'h8001);
    idle_bits(4);
    check(n_ok == 201, "good frame after errors decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
