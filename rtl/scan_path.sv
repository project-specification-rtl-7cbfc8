// scan_path - data monitor for the synchronised input data.
//
// After serial-to-parallel conversion and resynchronisation the nibbles of all
// 108 lines (432 bits) go straight into the de-multiplexing and algorithm logic,
// so this block records them for checking the synchronisation at set-up time.
// A rising edge of `en_scan` records the next SLICES consecutive crossings into a
// buffer of SLICES x 432 bits.  Slow control then reads the buffer 16 bits at a
// time: each `rd` pulse moves to the next word (27 words per slice, slice 0
// first; word w holds slice bits 16w+15..16w); `clr`, and each new recording,
// restart at word 0.  `busy` is high while recording.
// Slice count and width follow the specification, which places this logic in a
// separate FPGA configuration; the read order is this design's choice.
module scan_path #(
  parameter int unsigned SLICES  = 16,
  parameter int unsigned SLICE_W = 432,
  localparam int unsigned WPS    = (SLICE_W + 15) / 16,   // words per slice
  localparam int unsigned NW     = SLICES * WPS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en_scan,
  input  logic [SLICE_W-1:0] data,
  input  logic               rd,
  input  logic               clr,
  output logic [15:0]        word,
  output logic               busy
);
  logic [WPS*16-1:0]    buf_q [SLICES];
  logic                 en_q;
  logic [$clog2(SLICES+1)-1:0] n;     // slices recorded in this run
  logic [$clog2(NW)-1:0] ptr;
  logic [$clog2(SLICES)-1:0] rs;
  logic [$clog2(WPS)-1:0]    rw;

  assign busy = (n != SLICES[$bits(n)-1:0]);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      en_q <= 1'b0;
      n    <= SLICES[$bits(n)-1:0];
      ptr  <= '0;
    end else begin
      en_q <= en_scan;
      if (en_scan && !en_q) begin
        n   <= '0;
        ptr <= '0;
      end else begin
        if (busy) n <= n + 1'b1;
        if (clr) ptr <= '0;
        else if (rd) ptr <= (ptr == NW[$bits(ptr)-1:0] - 1'b1) ? '0 : ptr + 1'b1;
      end
    end

  always_ff @(posedge clk)
    if (busy && !(en_scan && !en_q))
      buf_q[n[$clog2(SLICES)-1:0]] <= (WPS*16)'(data);

  assign rs   = $bits(rs)'(ptr / WPS);
  assign rw   = $bits(rw)'(ptr % WPS);
  assign word = buf_q[rs][16*rw +: 16];
endmodule
