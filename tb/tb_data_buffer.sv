// tb_data_buffer: random byte-enabled writes and reads against a software copy.
// Checks the one-cycle read latency, that byte enables touch only their bytes, and that a
// read of the entry being written returns the old contents.
module tb_data_buffer;
  localparam int NB = 6, D = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                we = 1'b0;
  logic [3:0]          waddr = '0, raddr = '0;
  logic [NB-1:0]       wbe = '0;
  logic [NB-1:0][7:0]  wdata = '0, rdata;
  logic [NB-1:0][7:0]  model [D];
  int checks = 0, failures = 0;

  data_buffer #(.NBYTES(NB), .DEPTH(D)) dut (.*);

  initial begin
    logic [NB-1:0][7:0] expect_q;
    // fill every entry
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 4'(a); wbe = '1;
      for (int b = 0; b < NB; b++) wdata[b] = 8'($urandom);
      model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we    = 1'($urandom_range(0, 1));
      waddr = 4'($urandom);
      wbe   = NB'($urandom);
      for (int b = 0; b < NB; b++) wdata[b] = 8'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 4'($urandom);
      expect_q = model[raddr];                 // value before this cycle's write
      if (we) for (int b = 0; b < NB; b++) if (wbe[b]) model[waddr][b] = wdata[b];
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("read %0d: %h expected %h", raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
