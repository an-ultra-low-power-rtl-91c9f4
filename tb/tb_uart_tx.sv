// tb_uart_tx: sends random words and decodes the line at bit centres:
// start bit 0, eight data bits LSB first, stop bit 1, bytes least
// significant first. Also checks that one word takes 10*NBYTES bit times
// and that word_ready is low exactly while a word is being sent.
module tb_uart_tx;
  timeunit 1ps; timeprecision 1fs;
  localparam int NB = 4;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0;
  logic [8*NB-1:0] word;
  logic word_valid = 0, word_ready, txd;
  int checks = 0, failures = 0;
  longint cycles = 0;

  uart_tx #(.NBYTES(NB), .CLKS_PER_BIT(CPB)) dut (
    .clk(clk), .rst_n(rst_n), .word(word), .word_valid(word_valid),
    .word_ready(word_ready), .txd(txd));

  always #5000 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    checks++;
    if (txd !== 1'b1 || word_ready !== 1'b1) begin failures++; $display("FAIL idle line"); end
    for (int k = 0; k < 20; k++) begin
      logic [8*NB-1:0] sent, got;
      longint t1;
      sent = {$urandom(), $urandom()};
      @(negedge clk); word = sent; word_valid = 1;
      @(negedge clk); word_valid = 0; word = '0;
      got = '0;
      for (int b = 0; b < NB; b++) begin
        logic [9:0] frame;
        // the first start bit has already begun when word_valid is dropped
        if (b == 0) wait (txd === 1'b0);
        else @(negedge txd);
        if (b == 0) t1 = cycles;
        repeat (CPB / 2) @(posedge clk);
        for (int i = 0; i < 10; i++) begin
          frame[i] = txd;
          if (i < 9) repeat (CPB) @(posedge clk);
        end
        checks++;
        if (frame[0] !== 1'b0 || frame[9] !== 1'b1) begin
          failures++; $display("FAIL framing %b", frame);
        end
        got[8*b +: 8] = frame[8:1];
      end
      wait (word_ready);
      checks++;
      if (got !== sent) begin failures++; $display("FAIL word sent %h got %h", sent, got); end
      checks++;
      if (cycles - t1 < 10 * NB * CPB - CPB || cycles - t1 > 10 * NB * CPB + 2) begin
        failures++; $display("FAIL word time %0d cycles", cycles - t1);
      end
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
