// uart_tx: sends a multi-byte word over an asynchronous serial line.
//
// A word of NBYTES bytes is accepted on word_valid/word_ready and sent byte
// by byte, least significant byte first. Each byte is framed 8N1: one start
// bit (0), eight data bits LSB first, one stop bit (1). Every bit lasts
// CLKS_PER_BIT clocks. The line idles high. The serial format, the byte
// order and the bit rate are this design's choices; the defaults give
// 115200 baud from a 100 MHz clock.
module uart_tx #(
  parameter int unsigned NBYTES       = 4,
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [8*NBYTES-1:0] word,
  input  logic                word_valid,
  output logic                word_ready,
  output logic                txd
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned DW = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;
  localparam int unsigned BW = (NBYTES > 1) ? $clog2(NBYTES) : 1;

  logic [8*NBYTES-1:0] sh;
  logic [DW-1:0]       div;
  logic [3:0]          bitn;     // 0 start, 1..8 data, 9 stop
  logic [BW-1:0]       bytes_left;
  logic                active;
  logic [7:0]          cur_byte;

  assign cur_byte = sh[7:0];

  assign word_ready = !active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      txd        <= 1'b1;
      sh         <= '0;
      div        <= '0;
      bitn       <= '0;
      bytes_left <= '0;
    end else if (!active) begin
      txd <= 1'b1;
      if (word_valid) begin
        active     <= 1'b1;
        sh         <= word;
        bitn       <= 4'd0;
        div        <= DW'(CLKS_PER_BIT - 1);
        bytes_left <= BW'(NBYTES - 1);
        txd        <= 1'b0;
      end
    end else if (div != '0) begin
      div <= div - 1'b1;
    end else begin
      div <= DW'(CLKS_PER_BIT - 1);
      if (bitn == 4'd9) begin
        if (bytes_left == '0) begin
          active <= 1'b0;
          txd    <= 1'b1;
        end else begin
          bytes_left <= bytes_left - 1'b1;
          sh         <= sh >> 8;
          bitn       <= 4'd0;
          txd        <= 1'b0;
        end
      end else begin
        bitn <= bitn + 1'b1;
        txd  <= (bitn == 4'd8) ? 1'b1 : cur_byte[bitn[2:0]];
      end
    end
  end
endmodule
