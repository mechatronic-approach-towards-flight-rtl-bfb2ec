// Self-checking testbench of the serial transmitter.
//
// A receiver model watches the line. On each start bit it checks every
// clock cycle of the frame against the expected level: start bit, the
// eight data bits LSB first and the stop bit, each exactly `divisor`
// cycles long. Bytes are written in bursts with random gaps at two
// divisors; the testbench checks the order of the bytes, the delay from
// the write to the start bit, the spacing of back-to-back frames, the
// status bits, and that a byte written to a full FIFO is dropped and
// flagged as lost.
module tb_serial_tx;
  localparam int DEPTH = 16;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [1:0]  address = '0;
  logic        read = 1'b0, write = 1'b0;
  logic [31:0] writedata = '0, readdata;
  logic        txd;
  int          checks = 0, failures = 0;
  int          cyc = 0, div = 10, frames = 0, last_start = -1, write_cyc = -1;
  logic [7:0]  sent [$];

  serial_tx #(.CLK_HZ(1000), .BAUD(100), .FIFO_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // receiver model: compares every cycle of a frame with the expected level
  initial begin
    @(posedge rst_n);
    forever begin
      logic [9:0] frame;
      logic [7:0] b;
      int t0;
      @(posedge clk);
      if (txd == 1'b0) begin
        t0 = cyc;
        check(sent.size() > 0, "frame without a written byte");
        b = (sent.size() > 0) ? sent.pop_front() : 8'h00;
        frame = {1'b1, b, 1'b0};
        if (last_start >= 0 && write_cyc < last_start)
          check(t0 - last_start == 10 * div + 1, $sformatf("frame spacing %0d", t0 - last_start));
        last_start = t0;
        for (int i = 0; i < 10; i++)
          for (int k = 0; k < div; k++) begin
            if (i != 0 || k != 0) @(posedge clk);
            check(txd == frame[i], $sformatf("bit %0d of byte %h", i, b));
          end
        frames++;
      end
    end
  end

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk);
    address = 2'(a); writedata = d; write = 1'b1;
    @(negedge clk);
    write = 1'b0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk);
    address = 2'(a); read = 1'b1;
    @(negedge clk);
    read = 1'b0;
    d = readdata;
  endtask

  task automatic send(input logic [7:0] b);
    sent.push_back(b);
    wr(0, {24'b0, b});
    write_cyc = cyc;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    rd(2, d);
    check(d == 32'd10, "divisor reset value");
    rd(1, d);
    check(d[3:0] == 4'b0010, "idle status");
    // a single byte to an idle line: the write is taken at the edge after
    // `write` rises and the start bit appears one edge later
    fork
      send(8'hA5);
      begin
        int tw;
        @(posedge write); tw = cyc;
        @(negedge txd);
        check(cyc - tw == 2, $sformatf("start bit %0d cycles after the write", cyc - tw));
      end
    join
    wait (frames == 1);
    repeat (div + 5) @(posedge clk);
    // bursts at two divisors
    for (int pass = 0; pass < 2; pass++) begin
      if (pass == 1) begin
        div = 3;
        wr(2, 32'd3);
      end
      for (int n = 0; n < 60; n++) begin
        send(8'($urandom));
        if ($urandom_range(3) == 0) repeat ($urandom_range(30 * div)) @(posedge clk);
        while (1) begin
          rd(1, d);
          if (!d[0]) break;
        end
      end
      wait (sent.size() == 0);
      repeat (11 * div) @(posedge clk);
      rd(1, d);
      check(d[3:0] == 4'b0010, "idle after the burst");
    end
    // overflow: fill the FIFO while a frame is being sent, one byte too many
    div = 20;
    wr(2, 32'd20);
    for (int n = 0; n < DEPTH + 2; n++) send(8'(n + 1));   // one leaves at once
    rd(1, d);
    check(d[0] && d[3], "full and lost after overflow");
    void'(sent.pop_back());                   // the dropped byte
    wait (sent.size() == 0);
    repeat (11 * div) @(posedge clk);
    wr(1, 32'h8);
    rd(1, d);
    check(d[3:0] == 4'b0010, "lost cleared");
    check(frames == 1 + 120 + DEPTH + 1, $sformatf("frames %0d", frames));
    $display("frames %0d", frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
