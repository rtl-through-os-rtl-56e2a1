// tb_main_memory: random fetches and random loads, stores and AMOs on the
// two ports of the cached main memory, over an address range four times the
// cache size so that lines conflict and dirty lines are written back. Every
// response is compared with a reference memory. It also checks the
// single-cycle hit (response in the cycle after acceptance) and that a
// stream of fetch hits is served at one per cycle.
module tb_main_memory;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic f_req_valid, f_req_ready, f_resp_valid, d_req_valid, d_req_ready, d_resp_valid;
  logic [31:0] f_req_addr;
  mem_resp_t f_resp, d_resp;
  mem_req_t d_req;
  logic line_req_valid, line_req_ready, line_req_we, line_done;
  logic [31:0] line_req_addr;
  logic [511:0] line_wdata, line_rdata;
  main_memory dut (.*);
  tb_line_mem #(.WORDS(16384)) u_lm (.*);

  logic [31:0] model [4096];   // 16 KB range
  int checks = 0, failures = 0;
  logic [31:0] f_exp;
  logic f_out, d_out;
  logic [31:0] d_exp;
  int f_lat, n_resp_f = 0, n_resp_d = 0;

  initial begin
    for (int i = 0; i < 4096; i++) begin model[i] = i * 32'h01010101; u_lm.mem[i] = i * 32'h01010101; end
    f_req_valid = 0; d_req_valid = 0; d_req = '0; f_req_addr = 0;
    repeat (3) @(posedge clk); rst = 0;
    fork
      // fetch driver
      for (int n = 0; n < 1500; n++) begin
        @(negedge clk);
        f_req_valid = 1; f_req_addr = ({$urandom} % 2048) << 2;
        @(posedge clk); while (!f_req_ready) @(posedge clk);
        f_exp = model[f_req_addr[13:2]];
        @(negedge clk); f_req_valid = 0;
        while (!f_resp_valid) @(negedge clk);
        checks++; n_resp_f++;
        if (f_resp.rdata !== model[f_req_addr[13:2]]) begin failures++; $display("FAIL fetch %h", f_req_addr); end
      end
      // data driver
      for (int n = 0; n < 1500; n++) begin
        int k;
        logic [31:0] a, old;
        @(negedge clk);
        a = (2048 + {$urandom} % 2048) << 2;
        d_req.addr = a; d_req.wdata = $urandom; d_req.be = 4'($urandom);
        k = $urandom % 3;
        d_req.op = k == 0 ? MEM_LOAD : k == 1 ? MEM_STORE : MEM_AMO;
        d_req.amo = ($urandom % 2) ? AMO_ADD : AMO_MAXU;
        d_req_valid = 1;
        @(posedge clk); while (!d_req_ready) @(posedge clk);
        @(negedge clk); d_req_valid = 0;
        while (!d_resp_valid) @(negedge clk);
        old = model[a[13:2]];
        checks++; n_resp_d++;
        if (d_req.op != MEM_STORE && d_resp.rdata !== old) begin failures++; $display("FAIL data %h", a); end
        if (d_req.op == MEM_STORE) model[a[13:2]] = merge_be(old, d_req.wdata, d_req.be);
        if (d_req.op == MEM_AMO) model[a[13:2]] = amo_calc(d_req.amo, old, d_req.wdata);
        @(posedge clk);
      end
    join
    // hit latency and fetch stream rate: 16 words of one line, already cached after a first touch
    @(negedge clk); f_req_valid = 1; f_req_addr = 32'h40;
    @(posedge clk); while (!f_req_ready) @(posedge clk);
    @(negedge clk); f_req_valid = 0;
    while (!f_resp_valid) @(negedge clk);
    begin
      int start, got;
      start = 0; got = 0;
      for (int c = 0; c < 40 && got < 16; c++) begin
        @(negedge clk);
        if (f_resp_valid) begin
          got++;
          checks++; if (f_resp.rdata !== model[16 + got - 1] || !f_resp.hit) begin failures++; $display("FAIL stream word %0d", got); end
        end
        f_req_valid = (c < 16); f_req_addr = 32'h40 + 4 * c;
        if (c < 16) begin
          #1; checks++; if (!f_req_ready) begin failures++; $display("FAIL not ready on hit stream at %0d", c); end
        end
        start++;
      end
      f_req_valid = 0;
      checks++; if (got != 16 || start != 17) begin failures++; $display("FAIL stream: %0d words in %0d cycles", got, start); end
    end
    checks++; if (u_lm.writes == 0) begin failures++; $display("FAIL no write-back happened"); end
    $display("line reads=%0d writes=%0d", u_lm.reads, u_lm.writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
