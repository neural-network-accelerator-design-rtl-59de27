// dma: moves blocks of 32-bit words between external memory (AXI4 master,
// 32-bit data) and port A of the global buffer.
//
// A command (dla_pkg::dma_cmd_t) gives the direction, the external byte
// address, the buffer word address and the length in words. The transfer is
// cut into INCR bursts of at most MAX_BURST beats that never cross a 4 KB
// boundary (an AXI rule).
//  - external -> buffer: AR, then every R beat is written to the buffer in the
//    cycle it arrives (RREADY is held high during a burst).
//  - buffer -> external: the burst's words are first read from the buffer
//    (2-cycle read latency) into a local burst register file, then AW is sent
//    and the W beats follow back to back, then the B response is awaited.
// `done` pulses when the whole command has finished; `error` is set if any
// response was not OKAY (the transfer still runs to its end).
// The document fixes AXI, 32-bit data and burst transfers; the burst length,
// the staging of write data and the error handling are this design's.
//
// Rules of the AXI handshake are checked with assertions: a valid address or
// data beat keeps its value until it is accepted.
// rst_n also disables these assertions (disable iff), so lint reports it as
// used both synchronously and asynchronously; the design logic uses it only as
// an asynchronous reset. AxSIZE (4 bytes), AxBURST (INCR), WSTRB (all ones)
// and the upper bits of AxLEN (bursts of at most 16) are constant outputs.
module dma
  import dla_pkg::*;
#(
  parameter int unsigned MAX_BURST = 16,
  parameter int unsigned AW        = 15     // global buffer word address width
) (
  input  logic          clk,
  input  logic          rst_n,
  // command
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  dma_cmd_t      cmd,
  output logic          done,
  output logic          error,
  // global buffer port A
  output logic          buf_en,
  output logic          buf_we,
  output logic [AW-1:0] buf_addr,
  output logic [31:0]   buf_wdata,
  input  logic [31:0]   buf_rdata,
  input  logic          buf_rvalid,
  // AXI4 master: write address
  output logic [31:0]   m_awaddr,
  output logic [7:0]    m_awlen,
  output logic [2:0]    m_awsize,
  output logic [1:0]    m_awburst,
  output logic          m_awvalid,
  input  logic          m_awready,
  // write data
  output logic [31:0]   m_wdata,
  output logic [3:0]    m_wstrb,
  output logic          m_wlast,
  output logic          m_wvalid,
  input  logic          m_wready,
  // write response
  input  logic [1:0]    m_bresp,
  input  logic          m_bvalid,
  output logic          m_bready,
  // read address
  output logic [31:0]   m_araddr,
  output logic [7:0]    m_arlen,
  output logic [2:0]    m_arsize,
  output logic [1:0]    m_arburst,
  output logic          m_arvalid,
  input  logic          m_arready,
  // read data
  input  logic [31:0]   m_rdata,
  input  logic [1:0]    m_rresp,
  input  logic          m_rlast,
  input  logic          m_rvalid,
  output logic          m_rready
);
  localparam int unsigned BW = $clog2(MAX_BURST + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_AR, S_R, S_FETCH, S_AW, S_W, S_B
  } state_e;

  state_e       state_q;
  logic [31:0]  ext_q;        // next external byte address
  logic [AW-1:0] bad_q;       // next buffer word address
  logic [15:0]  left_q;       // words not yet started
  logic [BW-1:0] beats_q;     // beats of the current burst
  logic [BW-1:0] issued_q;    // buffer reads issued (write path)
  logic [BW-1:0] got_q;       // words received (both paths)
  logic [BW-1:0] sent_q;      // W beats sent
  logic [31:0]  stage_q [MAX_BURST];

  // Beats of the next burst: limited by MAX_BURST, the words left and the
  // next 4 KB boundary.
  logic [BW-1:0] next_beats;
  always_comb begin
    int unsigned to_4k, n;
    to_4k = (4096 - int'(ext_q[11:0])) / 4;
    n     = MAX_BURST;
    if (int'(left_q) < n) n = int'(left_q);
    if (to_4k < n)        n = to_4k;
    next_beats = BW'(n);
  end

  assign cmd_ready = (state_q == S_IDLE);

  // AXI constant fields
  assign m_awsize  = 3'd2;    // 4 bytes per beat
  assign m_awburst = 2'b01;   // INCR
  assign m_arsize  = 3'd2;
  assign m_arburst = 2'b01;
  assign m_wstrb   = 4'hF;
  assign m_awaddr  = ext_q;
  assign m_araddr  = ext_q;
  assign m_awlen   = 8'(beats_q - 1);
  assign m_arlen   = 8'(beats_q - 1);
  assign m_awvalid = (state_q == S_AW);
  assign m_arvalid = (state_q == S_AR) && (beats_q != 0);
  assign m_rready  = (state_q == S_R);
  assign m_bready  = (state_q == S_B);
  assign m_wvalid  = (state_q == S_W);
  assign m_wdata   = stage_q[sent_q[$clog2(MAX_BURST)-1:0]];
  assign m_wlast   = (state_q == S_W) && (sent_q == beats_q - 1);

  // Buffer port: writes from R beats, reads while fetching a write burst.
  always_comb begin
    buf_en    = 1'b0;
    buf_we    = 1'b0;
    buf_addr  = bad_q;
    buf_wdata = m_rdata;
    if (state_q == S_R && m_rvalid) begin
      buf_en = 1'b1;
      buf_we = 1'b1;
    end else if (state_q == S_FETCH && beats_q != 0 && issued_q != beats_q) begin
      buf_en   = 1'b1;
      buf_addr = bad_q + AW'(issued_q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      ext_q    <= '0;
      bad_q    <= '0;
      left_q   <= '0;
      beats_q  <= '0;
      issued_q <= '0;
      got_q    <= '0;
      sent_q   <= '0;
      done     <= 1'b0;
      error    <= 1'b0;
      for (int i = 0; i < MAX_BURST; i++) stage_q[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (cmd_valid) begin
          ext_q  <= cmd.ext_addr;
          bad_q  <= AW'(cmd.buf_addr);
          left_q <= cmd.len;
          error  <= 1'b0;
          if (cmd.len == 0) done <= 1'b1;
          else state_q <= cmd.to_ext ? S_FETCH : S_AR;
          beats_q  <= '0;
          issued_q <= '0;
          got_q    <= '0;
          sent_q   <= '0;
        end
        // ---------------- external -> buffer ----------------
        S_AR: begin
          if (beats_q == 0) beats_q <= next_beats;       // size the burst first
          else if (m_arready) begin
            left_q  <= left_q - 16'(beats_q);
            got_q   <= '0;
            state_q <= S_R;
          end
        end
        S_R: if (m_rvalid) begin
          bad_q <= bad_q + AW'(1);
          ext_q <= ext_q + 32'd4;
          got_q <= got_q + BW'(1);
          if (m_rresp != 2'b00) error <= 1'b1;
          if (m_rlast) begin
            beats_q <= '0;
            if (left_q == 0) begin
              done    <= 1'b1;
              state_q <= S_IDLE;
            end else state_q <= S_AR;
          end
        end
        // ---------------- buffer -> external ----------------
        S_FETCH: begin
          if (beats_q == 0) begin
            beats_q  <= next_beats;
            issued_q <= '0;
            got_q    <= '0;
          end else begin
            if (issued_q != beats_q) issued_q <= issued_q + BW'(1);
            if (buf_rvalid) begin
              stage_q[got_q[$clog2(MAX_BURST)-1:0]] <= buf_rdata;
              got_q <= got_q + BW'(1);
              if (got_q == beats_q - 1) state_q <= S_AW;
            end
          end
        end
        S_AW: if (m_awready) begin
          sent_q  <= '0;
          state_q <= S_W;
        end
        S_W: if (m_wready) begin
          sent_q <= sent_q + BW'(1);
          if (m_wlast) state_q <= S_B;
        end
        S_B: if (m_bvalid) begin
          if (m_bresp != 2'b00) error <= 1'b1;
          bad_q   <= bad_q + AW'(beats_q);
          ext_q   <= ext_q + 32'(beats_q) * 32'd4;
          left_q  <= left_q - 16'(beats_q);
          beats_q <= '0;
          if (left_q == 16'(beats_q)) begin
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else state_q <= S_FETCH;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // AXI handshake rules: once valid, hold until accepted, without changes.
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_arvalid && !m_arready |=> m_arvalid && $stable(m_araddr) && $stable(m_arlen));
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_awvalid && !m_awready |=> m_awvalid && $stable(m_awaddr) && $stable(m_awlen));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_wvalid && !m_wready |=> m_wvalid && $stable(m_wdata) && $stable(m_wlast));
  a_no_4k_cross: assert property (@(posedge clk) disable iff (!rst_n)
    m_arvalid |-> (int'(m_araddr[11:0]) + 4 * (int'(m_arlen) + 1) <= 4096));
endmodule : dma
