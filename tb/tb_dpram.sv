// tb_dpram - random writes (whole words and single lanes) and reads of the RoI
// history RAM, checked against a shadow array; the read data must be the word
// at the read address of the previous clock edge.
module tb_dpram;
  logic clk = 0;
  logic [2:0]  we = 0;
  logic [6:0]  waddr = 0, raddr = 0;
  logic [39:0] wdata = 0, rdata;
  logic [39:0] shadow [128];
  int checks = 0, failures = 0;

  dpram dut (.*);
  always #12.5 clk = ~clk;

  initial begin
    #10000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [39:0] exp_q;
    // fill every word
    for (int a = 0; a < 128; a++) begin
      @(negedge clk); we = 3'b111; waddr = 7'(a); wdata = {$urandom, $urandom};
      shadow[a] = wdata;
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we = 3'($urandom); waddr = 7'($urandom); wdata = {$urandom, $urandom};
      raddr = 7'($urandom);
      exp_q = shadow[raddr];                 // read-before-write at the same edge
      @(posedge clk);
      for (int b = 0; b < 40; b++)
        if (we[b < 16 ? 0 : (b < 32 ? 1 : 2)]) shadow[waddr][b] = wdata[b];
      #1;
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d got %h exp %h", raddr, rdata, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
