// tb_spiht_ram - self-checking test of the grouped multi-port RAM.
//
// 32 entries of 8 bits read in groups of 4 through two ports. Random
// writes and reads are compared with a plain array model: data must show
// one cycle after a read with re high and hold while re is low; a read of
// the entry written in the same cycle must return the old value.
`timescale 1ns/1ps
module tb_spiht_ram;
  localparam int W = 8, DEPTH = 32, GROUP = 4, NRD = 2;

  logic clk = 0;
  always #5 clk = ~clk;

  logic we;
  logic [4:0] waddr;
  logic [W-1:0] wdata;
  logic [NRD-1:0] re;
  logic [NRD-1:0][2:0] raddr;
  logic [NRD-1:0][GROUP-1:0][W-1:0] rdata;

  spiht_ram #(.W(W), .DEPTH(DEPTH), .GROUP(GROUP), .NRD(NRD)) dut (.*);

  logic [W-1:0] model [DEPTH];
  logic [NRD-1:0][GROUP-1:0][W-1:0] expect_q;
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = '0; wdata = '0; re = '0; raddr = '0;
    // fill every entry
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 5'(a); wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int r = 0; r < NRD; r++)
      for (int e = 0; e < GROUP; e++) expect_q[r][e] = '0;
    for (int it = 0; it < 400; it++) begin
      logic [NRD-1:0][GROUP-1:0][W-1:0] nxt;
      @(negedge clk);
      we = $urandom_range(0, 1) == 1;
      waddr = 5'($urandom);
      wdata = W'($urandom);
      re = NRD'($urandom);
      for (int r = 0; r < NRD; r++) raddr[r] = 3'($urandom);
      if (it % 7 == 0) raddr[0] = 3'(waddr >> 2);   // read during write
      nxt = expect_q;
      for (int r = 0; r < NRD; r++)
        if (re[r])
          for (int e = 0; e < GROUP; e++) nxt[r][e] = model[raddr[r] * GROUP + e];
      @(posedge clk);
      #1;
      if (we) model[waddr] = wdata;
      if (it > 0 || re != '0) begin
        for (int r = 0; r < NRD; r++)
          if (re[r] || it > 0) begin
            checks++;
            if (rdata[r] !== nxt[r]) begin
              failures++;
              $display("FAIL it %0d port %0d got %h want %h", it, r, rdata[r], nxt[r]);
            end
          end
      end
      expect_q = nxt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
