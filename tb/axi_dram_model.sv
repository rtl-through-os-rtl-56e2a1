// axi_dram_model: behavioural AXI4 slave standing in for the board's DRAM
// behind the processing system. It serves INCR bursts of 32-bit beats,
// one transaction at a time, with a random delay before each address is
// accepted and random gaps between read beats. WORDS words are modelled,
// starting at byte address BASE; the testbench loads them hierarchically.
module axi_dram_model #(
  parameter int unsigned WORDS = 65536,
  parameter logic [31:0] BASE  = 32'h0800_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] awaddr,
  input  logic [7:0]  awlen,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  input  logic        wlast,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  input  logic [31:0] araddr,
  input  logic [7:0]  arlen,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast,
  output logic        rvalid,
  input  logic        rready
);
  logic [31:0] mem [WORDS];
  logic [31:0] wa, ra;
  logic [7:0]  rleft;
  logic        wact, ract;
  int          dly;

  assign bresp = 2'b00;
  assign rresp = 2'b00;
  assign rdata = mem[(ra - BASE) >> 2];
  assign rlast = (rleft == 0);

  int reads = 0, writes = 0;

  always @(posedge clk) begin
    if (rst) begin
      awready <= 0; wready <= 0; bvalid <= 0; arready <= 0; rvalid <= 0;
      wact <= 0; ract <= 0; dly <= 0;
    end else begin
      awready <= 0; arready <= 0;
      if (dly > 0) dly <= dly - 1;
      if (!wact && !ract && dly == 0 && awvalid && !awready) begin
        awready <= 1; wa <= awaddr; wact <= 1; wready <= 1; writes++;
      end else if (!wact && !ract && dly == 0 && arvalid && !arready) begin
        arready <= 1; ra <= araddr; rleft <= arlen; ract <= 1; reads++;
      end else if (!wact && !ract && dly == 0 && (awvalid || arvalid)) begin
        dly <= 0;
      end
      if (wact && wvalid && wready) begin
        for (int i = 0; i < 4; i++)
          if (wstrb[i]) mem[(wa - BASE) >> 2][i*8 +: 8] <= wdata[i*8 +: 8];
        wa <= wa + 4;
        if (wlast) begin wready <= 0; bvalid <= 1; end
      end
      if (bvalid && bready) begin bvalid <= 0; wact <= 0; dly <= $urandom % 8; end
      if (ract && !arready) begin
        if (rvalid && rready) begin
          ra <= ra + 4;
          if (rlast) begin rvalid <= 0; ract <= 0; dly <= $urandom % 8; end
          else begin rleft <= rleft - 1; rvalid <= ($urandom % 4 != 0); end
        end else if (!rvalid) begin
          rvalid <= ($urandom % 2 == 0);
        end
      end
    end
  end
endmodule
