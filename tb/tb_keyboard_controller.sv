// tb_keyboard_controller: sends PS/2 frames for key presses and releases,
// with and without Shift, plus a frame with a parity error, and checks the
// ASCII characters delivered and their acknowledge.
module tb_keyboard_controller;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic ps2_clk = 1, ps2_data = 1, char_valid, ack = 0;
  logic [7:0] char_data;
  keyboard_controller #(.TIMEOUT(2048)) dut (.*);
  int checks = 0, failures = 0;

  task automatic send(input logic [7:0] code, input logic bad_parity = 0);
    logic [10:0] f;
    f = {1'b1, (~^code) ^ bad_parity, code, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = f[i];
      repeat (10) @(posedge clk);
      ps2_clk = 0;
      repeat (20) @(posedge clk);
      ps2_clk = 1;
      repeat (10) @(posedge clk);
    end
    repeat (20) @(posedge clk);
  endtask
  task automatic expect_char(input logic [7:0] c);
    checks++;
    if (!char_valid || char_data !== c) begin
      failures++; $display("FAIL expected %h got valid=%b %h", c, char_valid, char_data);
    end
    @(negedge clk); ack = 1; @(negedge clk); ack = 0;
    checks++; if (char_valid) begin failures++; $display("FAIL ack"); end
  endtask
  task automatic expect_none();
    checks++;
    if (char_valid) begin failures++; $display("FAIL unexpected char %h", char_data); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    send(8'h1C); expect_char("a");
    send(8'hF0); send(8'h1C); expect_none();        // release gives nothing
    send(8'h12); send(8'h33); expect_char("H");     // shift + h
    send(8'h16); expect_char("!");                  // shift + 1
    send(8'hF0); send(8'h12);                       // shift released
    send(8'h16); expect_char("1");
    send(8'h29); expect_char(" ");
    send(8'h5A); expect_char(8'h0A);
    send(8'h1C, 1); expect_none();                  // parity error dropped
    send(8'hE0); send(8'h75); expect_none();        // extended key ignored
    send(8'h4D); expect_char("p");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
