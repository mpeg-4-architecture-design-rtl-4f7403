// amba_master: AMBA access state machine of the texture engine.
//
// It serves two jobs on the shared 32-bit bus, never both at once:
//  * read: on rd_start, fetch the 96 words (four 8-bit pixels each) of one
//    macroblock, Y1..Y4 then Cb and Cr, 16 words per block, and write them
//    into the ping-pong buffer (pp_*), each pixel widened to 9 bits;
//    rd_done pulses when the last word is in.
//  * write: reconstructed words pushed by the serial-to-parallel block
//    (wr_push, block/word address) wait in a WR_DEPTH-entry FIFO and are
//    written to the reconstructed frame, sixteen writes per block.
// Pending writes are served before a read is started. States: IDLE,
// REQUEST (bus_req high until bus_user shows this engine), GET_RADDR /
// GET_WADDR (latch the frame offsets), READ, WRITE, FINISH.
// Addresses are byte addresses: luminance base + ptr_y_l + (16*mb_y + row)
// * WIDTH + ptr_x_l + 16*mb_x + column, chrominance likewise with
// ptr_y_c/ptr_x_c, 8*mb_y, 8*mb_x and WIDTH/2, where the ptr_* inputs are the
// initial frame-pointer offsets (x in pixels, y as a byte offset). The read
// job takes its macroblock position when it starts (rd_mb_*); writes use
// the current macroblock's (cur_mb_*).
// Bus timing: address and HWRITE in one cycle, data in the next (HRDATA
// taken at its end, HWDATA driven during it), no wait states, as the engine has no ready
// input. The state list and the sixteen writes per block follow the design;
// the frame layout, the bus timing, the FIFO and the priority are this
// design's choices.
module amba_master #(
  parameter int          WIDTH     = 352,
  parameter logic [2:0]  BUS_ID    = 3'd1,
  parameter logic [31:0] CUR_Y     = 32'h0000_0000,
  parameter logic [31:0] CUR_U     = 32'h0001_8C00,
  parameter logic [31:0] CUR_V     = 32'h0001_EF00,
  parameter logic [31:0] REC_Y     = 32'h0010_0000,
  parameter logic [31:0] REC_U     = 32'h0011_8C00,
  parameter logic [31:0] REC_V     = 32'h0011_EF00,
  parameter int          WR_DEPTH  = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // read job
  input  logic        rd_start,
  input  logic [4:0]  rd_mb_x,
  input  logic [4:0]  rd_mb_y,
  output logic        rd_done,
  output logic        rd_busy,
  // write job
  input  logic        wr_push,
  input  logic [31:0] wr_data,
  input  logic [6:0]  wr_addr,
  input  logic [4:0]  cur_mb_x,
  input  logic [4:0]  cur_mb_y,
  // frame-pointer offsets
  input  logic [8:0]  ptr_x_l,
  input  logic [8:0]  ptr_x_c,
  input  logic [16:0] ptr_y_l,
  input  logic [16:0] ptr_y_c,
  output logic        wr_empty,
  // ping-pong buffer write port
  output logic        pp_wr_en,
  output logic [6:0]  pp_waddr,
  output logic [35:0] pp_wdata,
  // bus
  output logic        bus_req,
  input  logic [2:0]  bus_user,
  output logic        hwrite,
  output logic [31:0] haddr,
  output logic [31:0] hwdata,
  input  logic [31:0] hrdata
);
  localparam int FW = $clog2(WR_DEPTH);

  typedef enum logic [2:0] {
    A_IDLE, A_REQUEST, A_GET_RADDR, A_GET_WADDR, A_READ, A_WRITE, A_FINISH
  } astate_t;
  astate_t st;

  // write FIFO
  logic [38:0] fifo [WR_DEPTH];
  logic [FW:0] wp, rp;
  logic        fifo_empty;
  assign fifo_empty = (wp == rp);
  assign wr_empty   = fifo_empty && !wr_push && (st != A_WRITE);

  logic        rd_pend, job_rd;
  logic [6:0]  rcnt;
  logic [4:0]  rmx, rmy;
  logic        rdat_v, rdat_v2;
  logic [6:0]  rdat_a, rdat_a2;
  logic        wdat_v;
  logic [31:0] wdat;

  // byte address of word j of block b for the given frame bases and offsets
  function automatic logic [31:0] word_addr(input logic [2:0] b, input logic [3:0] j,
      input logic [31:0] by, input logic [31:0] bu, input logic [31:0] bv,
      input logic [4:0] mx, input logic [4:0] my);
    logic [31:0] row, col;
    if (b < 3'd4) begin
      row = 32'(my) * 16 + 32'(b[1]) * 8 + 32'(j[3:1]);
      col = 32'(mx) * 16 + 32'(b[0]) * 8 + 32'(j[0]) * 4;
      return by + 32'(ptr_y_l) + row * WIDTH + 32'(ptr_x_l) + col;
    end else begin
      row = 32'(my) * 8 + 32'(j[3:1]);
      col = 32'(mx) * 8 + 32'(j[0]) * 4;
      return ((b == 3'd4) ? bu : bv) + 32'(ptr_y_c) + row * (WIDTH / 2) + 32'(ptr_x_c) + col;
    end
  endfunction

  always_ff @(posedge clk) begin
    if (wr_push) fifo[wp[FW-1:0]] <= {wr_addr, wr_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_IDLE; wp <= '0; rp <= '0; rd_pend <= 1'b0; job_rd <= 1'b0; rcnt <= '0;
      rmx <= '0; rmy <= '0;
      rdat_v <= 1'b0; rdat_a <= '0; rdat_v2 <= 1'b0; rdat_a2 <= '0; wdat_v <= 1'b0; wdat <= '0;
      rd_done <= 1'b0; bus_req <= 1'b0; hwrite <= 1'b0; haddr <= '0; hwdata <= '0;
      pp_wr_en <= 1'b0; pp_waddr <= '0; pp_wdata <= '0;
    end else begin
      rd_done  <= 1'b0;
      pp_wr_en <= 1'b0;
      if (wr_push) wp <= wp + 1'b1;
      if (rd_start) begin
        rd_pend <= 1'b1;
        rmx <= rd_mb_x; rmy <= rd_mb_y;
      end
      // rdat_v marks an address phase on the bus, rdat_v2 its data phase,
      // at whose end HRDATA is taken
      rdat_v  <= 1'b0;
      rdat_v2 <= rdat_v;
      rdat_a2 <= rdat_a;
      if (rdat_v2) begin
        pp_wr_en <= 1'b1;
        pp_waddr <= rdat_a2;
        pp_wdata <= {1'b0, hrdata[31:24], 1'b0, hrdata[23:16], 1'b0, hrdata[15:8], 1'b0, hrdata[7:0]};
      end
      wdat_v <= 1'b0;
      if (wdat_v) hwdata <= wdat;
      hwrite <= 1'b0;

      unique case (st)
        A_IDLE: if (!fifo_empty || rd_pend) begin
          // pending writes go first
          job_rd  <= fifo_empty;
          bus_req <= 1'b1;
          st      <= A_REQUEST;
        end
        A_REQUEST: if (bus_user == BUS_ID) st <= job_rd ? A_GET_RADDR : A_GET_WADDR;
        A_GET_RADDR: begin rcnt <= '0; rd_pend <= rd_start; st <= A_READ; end
        A_GET_WADDR: st <= A_WRITE;
        A_READ: begin
          haddr  <= word_addr(rcnt[6:4], rcnt[3:0], CUR_Y, CUR_U, CUR_V, rmx, rmy);
          rdat_v <= 1'b1;
          rdat_a <= rcnt;
          rcnt   <= rcnt + 7'd1;
          if (rcnt == 7'd95) st <= A_FINISH;
        end
        A_WRITE: if (!fifo_empty) begin
          automatic logic [38:0] e = fifo[rp[FW-1:0]];
          haddr  <= word_addr(e[38:36], e[35:32], REC_Y, REC_U, REC_V,
                              cur_mb_x, cur_mb_y);
          hwrite <= 1'b1;
          wdat_v <= 1'b1;
          wdat   <= e[31:0];
          rp     <= rp + 1'b1;
        end else st <= A_FINISH;
        A_FINISH: begin
          // a read job ends when its last data phase is over
          if (!rdat_v && !rdat_v2) begin
            bus_req <= 1'b0;
            rd_done <= job_rd;
            st      <= A_IDLE;
          end
        end
        default: st <= A_IDLE;
      endcase
    end
  end

  assign rd_busy = rd_pend || (job_rd && (st != A_IDLE));

  a_fifo_room: assert property (@(posedge clk) disable iff (!rst_n)
    wr_push |-> ((wp - rp) != (FW+1)'(WR_DEPTH)));
endmodule
