// axi_mem_model: behavioural AXI4 slave memory (32-bit data, INCR bursts)
// standing in for the external SDRAM in the testbenches. Read data comes
// after READ_LAT cycles; READY and VALID signals are randomly stalled when
// STALL is set. Words are addressed by byte address / 4. Also counts bursts
// and checks that no burst crosses a 4 KB boundary.
// A stand-in for the external SDRAM of the document's SoC; its latency and
// stall pattern are this model's choices. Ports: the AW, W, B, AR and R channel
// signals of a 32-bit AXI4 slave (size, burst and strobes are taken as
// 4 bytes, INCR and all set).
module axi_mem_model #(
  parameter int WORDS    = 65536,
  parameter int READ_LAT = 8,
  parameter bit STALL    = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] awaddr,
  input  logic [7:0]  awlen,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
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
  int rd_bursts = 0, wr_bursts = 0, crossings = 0, wlast_errors = 0;

  // ---- read channel ----
  logic        rd_busy = 0;
  int          rd_addr, rd_left, rd_wait;
  assign rresp = 2'b00;
  always @(posedge clk) begin
    if (!rst_n) begin
      rd_busy <= 0; rvalid <= 0; arready <= 0; rlast <= 0;
    end else begin
      arready <= !rd_busy && (!STALL || ($urandom % 3 != 0));
      if (arvalid && arready && !rd_busy) begin
        rd_busy  <= 1;
        rd_addr  = int'(araddr) / 4;
        rd_left  = int'(arlen) + 1;
        rd_wait  = READ_LAT;
        rd_bursts++;
        if ((araddr % 4096) + 4 * (arlen + 1) > 4096) crossings++;
        arready  <= 0;
      end
      if (rvalid && rready) begin
        rd_addr++;
        rd_left--;
        rvalid <= 0;
        if (rd_left == 0) begin rd_busy <= 0; rlast <= 0; end
      end
      if (rd_busy && rd_left > 0 && (!rvalid || rready)) begin
        if (rd_wait > 0) rd_wait--;
        else if (!STALL || ($urandom % 4 != 0)) begin
          rvalid <= 1;
          rdata  <= mem[rd_addr % WORDS];
          rlast  <= (rd_left == 1);
        end
      end
    end
  end

  // ---- write channels ----
  logic wr_busy = 0;
  int   wr_addr, wr_left;
  always @(posedge clk) begin
    if (!rst_n) begin
      wr_busy <= 0; awready <= 0; wready <= 0; bvalid <= 0; bresp <= 0;
    end else begin
      awready <= !wr_busy && !bvalid && (!STALL || ($urandom % 3 != 0));
      if (awvalid && awready && !wr_busy) begin
        wr_busy <= 1;
        wr_addr  = int'(awaddr) / 4;
        wr_left  = int'(awlen) + 1;
        wr_bursts++;
        if ((awaddr % 4096) + 4 * (awlen + 1) > 4096) crossings++;
        awready <= 0;
      end
      wready <= wr_busy && (!STALL || ($urandom % 4 != 0));
      if (wvalid && wready && wr_busy) begin
        mem[wr_addr % WORDS] = wdata;
        wr_addr++;
        wr_left--;
        if (wlast != (wr_left == 0)) wlast_errors++;
        if (wr_left == 0) begin
          wr_busy <= 0;
          wready  <= 0;
          bvalid  <= 1;
        end
      end
      if (bvalid && bready) bvalid <= 0;
    end
  end
endmodule
