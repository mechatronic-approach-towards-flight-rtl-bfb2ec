// Self-checking testbench of circ_buffer: writes random samples (more than
// the depth, so the pointer wraps twice), and after each write reads a
// spread of ages, comparing with a software history of all samples (ages
// beyond the number written must read zero). Checks the one-cycle read
// latency and read-before-write in a shared cycle.
module tb_circ_buffer;
  localparam int DEPTH = 512;
  localparam int W     = 16;

  logic                     clk = 1'b0;
  logic                     rst_n = 1'b0;
  logic                     wr_en = 1'b0, rd_en = 1'b0;
  logic signed [W-1:0]      wr_data = '0;
  logic [$clog2(DEPTH)-1:0] rd_age = '0;
  logic signed [W-1:0]      rd_data;
  int                       checks = 0, failures = 0;
  logic signed [W-1:0]      hist [$];     // hist[0] is the newest sample

  circ_buffer #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [W-1:0] model(input int age);
    return (age < hist.size()) ? hist[age] : '0;
  endfunction

  task automatic read_check(input int age);
    @(negedge clk);
    rd_en = 1'b1; rd_age = age[$clog2(DEPTH)-1:0];
    @(negedge clk);
    rd_en = 1'b0;
    checks++;
    if (rd_data !== model(age)) begin
      failures++;
      if (failures < 10) $display("FAIL age %0d: got %0d expected %0d (%0d written)",
                                  age, rd_data, model(age), hist.size());
    end
  endtask

  initial begin
    logic signed [W-1:0] old;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    read_check(0);                         // empty buffer reads zero
    for (int n = 0; n < 2 * DEPTH + 37; n++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_data = W'($urandom);
      @(negedge clk);
      wr_en = 1'b0;
      hist.push_front(wr_data);
      if (hist.size() > DEPTH) void'(hist.pop_back());
      read_check(0);
      read_check(int'($urandom_range(DEPTH - 1)));
      if (n % 64 == 0)
        for (int k = 0; k < DEPTH; k++) read_check(k);
    end
    // read in the same cycle as a write: sees the buffer before the write
    old = model(0);
    @(negedge clk);
    wr_en = 1'b1; wr_data = 16'sh1234; rd_en = 1'b1; rd_age = '0;
    @(negedge clk);
    wr_en = 1'b0; rd_en = 1'b0;
    hist.push_front(16'sh1234);
    void'(hist.pop_back());
    checks++;
    if (rd_data !== old) begin
      failures++;
      $display("FAIL read during write: got %0d expected %0d", rd_data, old);
    end
    read_check(0);
    read_check(DEPTH - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
