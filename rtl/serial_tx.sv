// Serial digital output of the flutter monitor: sends result bytes written
// by the processor to external devices as an asynchronous serial stream.
//
// The processor writes bytes into a FIFO over the bus; the transmitter
// takes them one at a time and shifts each out as a frame of one start bit
// (0), eight data bits LSB first and one stop bit (1), every bit lasting
// `divisor` clock cycles. Between frames the line idles high. A byte written
// while the FIFO is full is dropped and sets a sticky `lost` flag.
//
// Register map (word address):
//   0 DATA    write: [7:0] byte to send
//   1 STATUS  read: [0] FIFO full, [1] FIFO empty, [2] busy (a frame is on
//             the line or bytes are waiting), [3] lost (write 1 to clear)
//   2 DIVISOR [15:0] clock cycles per bit, reset value CLK_HZ / BAUD;
//             values below 2 are treated as 2
// Read latency 1 cycle. A frame lasts 10 * divisor cycles; the start bit
// of a byte written to an idle transmitter appears on the line one cycle
// after the write, and back-to-back frames start 10 * divisor + 1 cycles
// apart.
// That the monitor has a serial interface for its results follows the
// document; the frame format, the FIFO and the register map are this
// design's choice.
module serial_tx #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  address,
  input  logic        read,
  input  logic        write,
  input  logic [31:0] writedata,
  output logic [31:0] readdata,
  output logic        txd
);
  localparam int unsigned FW = $clog2(FIFO_DEPTH);

  logic [7:0]  fifo [FIFO_DEPTH];
  logic [FW:0] wr_ptr, rd_ptr;
  logic [15:0] divisor;
  logic        lost;
  logic [8:0]  shreg;          // stop bit and data; the start bit goes out first
  logic [3:0]  bits_left;      // bits of the frame still to send, 0 = idle
  logic [15:0] bit_cnt;

  wire fifo_full  = (wr_ptr[FW] != rd_ptr[FW]) && (wr_ptr[FW-1:0] == rd_ptr[FW-1:0]);
  wire fifo_empty = (wr_ptr == rd_ptr);
  wire push       = write && address == 2'd0;
  wire pop        = (bits_left == 0) && !fifo_empty;
  wire [15:0] div = (divisor < 16'd2) ? 16'd2 : divisor;

  always_ff @(posedge clk) begin
    if (push && !fifo_full) fifo[wr_ptr[FW-1:0]] <= writedata[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      divisor   <= 16'(CLK_HZ / BAUD);
      lost      <= 1'b0;
      shreg     <= '1;
      bits_left <= '0;
      bit_cnt   <= '0;
      txd       <= 1'b1;
      readdata  <= '0;
    end else begin
      // bus side
      if (push) begin
        if (fifo_full) lost <= 1'b1;
        else           wr_ptr <= wr_ptr + 1'b1;
      end
      if (write && address == 2'd1 && writedata[3]) lost <= 1'b0;
      if (write && address == 2'd2) divisor <= writedata[15:0];
      readdata <= '0;
      if (read) begin
        unique case (address)
          2'd1:    readdata <= {28'b0, lost, !fifo_empty || bits_left != 0, fifo_empty, fifo_full};
          2'd2:    readdata <= {16'b0, divisor};
          default: readdata <= '0;
        endcase
      end
      // line side
      if (pop) begin
        shreg     <= {1'b1, fifo[rd_ptr[FW-1:0]]};
        rd_ptr    <= rd_ptr + 1'b1;
        bits_left <= 4'd10;
        bit_cnt   <= div - 1'b1;
        txd       <= 1'b0;                        // start bit
      end else if (bits_left != 0) begin
        if (bit_cnt == 0) begin
          bits_left <= bits_left - 1'b1;
          bit_cnt   <= div - 1'b1;
          if (bits_left != 1) begin
            txd   <= shreg[0];
            shreg <= {1'b1, shreg[8:1]};
          end else begin
            txd   <= 1'b1;                        // frame over, line idles
          end
        end else begin
          bit_cnt <= bit_cnt - 1'b1;
        end
      end
    end
  end
endmodule
