// memory_buffer: DMA of the video stream into a frame buffer in shared
// memory, so that a CPU can compute descriptors around detected features.
//
// Active pixels are packed four to a 32-bit word (first pixel in the low
// byte) and written, word after word, to frame_base + 4*n, n counting from
// zero at the first pixel of each frame. Words wait in a small FIFO so that
// the bus master can be stalled by m_waitrequest without stopping the
// pixel stream; if the FIFO is full a word is dropped and the sticky
// overflow flag is raised. line_count tells how many whole lines of the
// current frame have been accepted by the bus, which is how a CPU knows that
// the image around a feature is in memory.
//
// Bus timing (Avalon-MM style write master): m_address, m_write and
// m_writedata stay stable while m_waitrequest is high; a word is taken in
// the tick where m_write is high and m_waitrequest low. W must be a
// multiple of four. The DMA role and the shared frame buffer follow the
// source design; the packing, the FIFO, line_count and the bus protocol
// are this design's choices.
module memory_buffer
  import surf_pkg::*;
#(
  parameter int unsigned W          = DEF_W,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic             pixel_clk,
  input  logic             rst,
  input  logic [PIX_W-1:0] pixel_data,
  input  sync_t            sync,
  input  logic [31:0]      frame_base,
  // write master
  output logic [31:0]      m_address,
  output logic             m_write,
  output logic [31:0]      m_writedata,
  input  logic             m_waitrequest,
  // status
  output logic             overflow,
  output logic [YW-1:0]    line_count
);

  localparam int unsigned AW = $clog2(FIFO_DEPTH);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  typedef struct packed {
    logic        sof;   // first word of a frame
    logic        eol;   // last word of a line
    logic [31:0] addr;
    logic [31:0] data;
  } word_t;

  // ---------------- packing ----------------
  logic [23:0] pack_q;     // pixels 0..2 of the word being assembled
  logic [1:0]  lane;       // byte lane of the next pixel (0 at x_cnt 0)
  logic [29:0] word_idx;   // word offset within the frame
  logic        sof_pend;   // next word is the first of the frame
  logic        word_rdy;
  word_t       word_in;

  wire active = !sync.blank;
  wire frame0 = active && (sync.x == '0) && (sync.y == '0);
  // lane of this pixel: re-aligned to 0 at the start of every line
  wire [1:0] lane_e = (sync.x == '0) ? 2'd0 : lane;

  always_comb begin
    word_rdy     = active && (lane_e == 2'd3);
    word_in.sof  = sof_pend;
    word_in.eol  = (32'(sync.x) == W - 1);
    word_in.addr = frame_base + {word_idx, 2'b00};
    word_in.data = {pixel_data, pack_q};
  end

  always_ff @(posedge pixel_clk) begin
    if (rst) begin
      pack_q   <= '0;
      lane     <= '0;
      word_idx <= '0;
      sof_pend <= 1'b0;
    end else if (active) begin
      unique case (lane_e)
        2'd0: pack_q[7:0]   <= pixel_data;
        2'd1: pack_q[15:8]  <= pixel_data;
        2'd2: pack_q[23:16] <= pixel_data;
        default: ;
      endcase
      lane <= lane_e + 1'b1;
      if (frame0) begin
        sof_pend <= 1'b1;
        word_idx <= '0;
      end else if (word_rdy) begin
        word_idx <= word_idx + 1'b1;
        sof_pend <= 1'b0;
      end
    end
  end

  // ---------------- word FIFO ----------------
  word_t         fifo_mem [FIFO_DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [CW-1:0] count;
  logic          push, pop, full, empty;
  word_t         head;

  assign full  = (32'(count) == FIFO_DEPTH);
  assign empty = (count == '0);
  assign push  = word_rdy && !full;
  assign pop   = !empty && !m_waitrequest;
  assign head  = fifo_mem[rd_ptr];

  always_ff @(posedge pixel_clk) begin
    if (push) fifo_mem[wr_ptr] <= word_in;
  end

  always_ff @(posedge pixel_clk) begin
    if (rst) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      count      <= '0;
      overflow   <= 1'b0;
      line_count <= '0;
    end else begin
      if (push) wr_ptr <= (32'(wr_ptr) == FIFO_DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (32'(rd_ptr) == FIFO_DEPTH - 1) ? '0 : rd_ptr + 1'b1;
      count <= count + CW'(push) - CW'(pop);
      if (word_rdy && full) overflow <= 1'b1;
      if (pop) begin
        if (head.sof) line_count <= head.eol ? YW'(1) : '0;
        else if (head.eol) line_count <= line_count + 1'b1;
      end
    end
  end

  assign m_write     = !empty;
  assign m_address   = head.addr;
  assign m_writedata = head.data;

  initial assert (W % 4 == 0);

  // a word offered to the bus stays unchanged until it is taken
  property p_hold;
    @(posedge pixel_clk) disable iff (rst)
      (m_write && m_waitrequest) |=> (m_write && $stable(m_address) && $stable(m_writedata));
  endproperty
  a_hold: assert property (p_hold);

endmodule
