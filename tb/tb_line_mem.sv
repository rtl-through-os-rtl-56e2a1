// tb_line_mem: behavioural backing store for the main memory's line
// interface. It accepts one line request at a time and pulses line_done
// after a fixed LATENCY; reads return the stored line, writes store it.
// WORDS words are modelled from address 0.
module tb_line_mem #(
  parameter int unsigned WORDS   = 16384,
  parameter int unsigned LATENCY = 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         line_req_valid,
  output logic         line_req_ready,
  input  logic         line_req_we,
  input  logic [31:0]  line_req_addr,
  input  logic [511:0] line_wdata,
  output logic         line_done,
  output logic [511:0] line_rdata
);
  logic [31:0] mem [WORDS];
  int cnt;
  logic busy, we;
  logic [31:0] a;
  int reads = 0, writes = 0;
  assign line_req_ready = !busy;
  always @(posedge clk) begin
    line_done <= 0;
    if (rst) begin
      busy <= 0; cnt <= 0;
    end else if (!busy && line_req_valid) begin
      busy <= 1; cnt <= LATENCY; we <= line_req_we; a <= line_req_addr;
      if (line_req_we) begin
        writes++;
        for (int w = 0; w < 16; w++) mem[(line_req_addr >> 2) % WORDS + w] <= line_wdata[w*32 +: 32];
      end else reads++;
    end else if (busy) begin
      if (cnt == 0) begin
        busy <= 0; line_done <= 1;
        for (int w = 0; w < 16; w++) line_rdata[w*32 +: 32] <= mem[(a >> 2) % WORDS + w];
      end else cnt <= cnt - 1;
    end
  end
endmodule
