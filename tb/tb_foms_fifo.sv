// tb_foms_fifo -- self-checking testbench for foms_fifo (default 1024 x 33).
//
// Write clock 16 MHz (FPDP strobe), read clock 50 MHz. A queue models the
// FIFO. Phase 1 streams random words with random read gaps and checks order
// and contents. Phase 2 stops the reader, writes until full and checks that
// exactly DEPTH words are accepted and that further writes are dropped and
// reported. Phase 3 drains and checks the data and the empty flag.
//
// The depth and the loss of words on overflow follow the specification; the
// clock-crossing FIFO itself is this design's choice.
module tb_foms_fifo;
  localparam int WIDTH = 33;
  localparam int DEPTH = 1024;

  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic wfull, wr_drop, rempty;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [$];
  int drops = 0;

  foms_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #31 wclk = ~wclk;
  always #10 rclk = ~rclk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge wclk) if (wr_drop) drops++;

  // writer: one word per call, model updated when the FIFO accepts it
  task automatic put(input logic [WIDTH-1:0] d);
    @(negedge wclk);
    wr_en = 1; wdata = d;
    if (!wfull) model.push_back(d);
    @(negedge wclk);
    wr_en = 0;
  endtask

  // reader: pop when not empty, compare the word one cycle later
  bit reader_on = 0;
  bit rd_pending = 0;
  always @(negedge rclk) begin
    if (rd_pending) begin
      logic [WIDTH-1:0] e;
      e = model.pop_front();
      check(rdata == e, $sformatf("read %h expected %h", rdata, e));
    end
    rd_pending = 0;
    rd_en = reader_on && !rempty && ($urandom_range(0, 3) != 0);
    if (rd_en) rd_pending = 1;
  end

  initial begin : watchdog
    #20ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    #200 wrst_n = 1; rrst_n = 1;
    check(rempty, "empty after reset");
    // phase 1: streaming
    reader_on = 1;
    repeat (3000) put({$urandom, 1'($urandom)});
    wait (model.size() == 0);
    repeat (10) @(posedge rclk);
    check(rempty, "empty after streaming");
    // phase 2: fill
    reader_on = 0;
    repeat (10) @(posedge rclk);
    drops = 0;
    n = 0;
    while (!wfull) begin put({$urandom, 1'($urandom)}); n++; end
    check(model.size() == DEPTH, $sformatf("accepted %0d words, expected %0d", model.size(), DEPTH));
    put('1); put('1); put('1);
    @(negedge wclk);
    check(drops == 3, $sformatf("expected 3 dropped writes, saw %0d", drops));
    check(model.size() == DEPTH, "full FIFO must not accept words");
    // phase 3: drain
    reader_on = 1;
    wait (model.size() == 0);
    repeat (10) @(posedge rclk);
    check(rempty, "empty after drain");
    check(!wfull, "not full after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
