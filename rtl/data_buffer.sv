// data_buffer: one of the accelerating core's G-deep buffers (pwd(TP), DA, DB, DS(TS),
// state) and, at depth 256, the storage of the LAE buffer.
//
// Each entry holds the value of one password of the group (NBYTES bytes), and all bytes of
// an entry are read in one cycle, which is what the document means by partitioning the
// buffer completely along the variable dimension.  One write port with a byte enable per
// byte, one synchronous read port: rdata shows the entry addressed in the previous cycle.
// A read of the entry being written returns the old contents.  Nothing is reset; the core
// only reads entries it has written.  Byte enables are this design's own choice; they let
// the host load an entry one 32-bit word at a time.
module data_buffer #(
  parameter int NBYTES = 32,
  parameter int DEPTH  = 2048,
  localparam int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                   clk,
  input  logic                   we,
  input  logic [AW-1:0]          waddr,
  input  logic [NBYTES-1:0]      wbe,
  input  logic [NBYTES-1:0][7:0] wdata,
  input  logic [AW-1:0]          raddr,
  output logic [NBYTES-1:0][7:0] rdata
);

  logic [NBYTES-1:0][7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      for (int b = 0; b < NBYTES; b++)
        if (wbe[b]) mem[waddr][b] <= wdata[b];
    rdata <= mem[raddr];
  end

endmodule
