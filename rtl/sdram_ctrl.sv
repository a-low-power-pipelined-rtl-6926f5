// sdram_ctrl: controller for the external DDR SDRAM.
//
// It waits after reset until the memory reports ready (initialisation done),
// then serves one burst request at a time from the main controller: a READ
// or WRITE command with the burst start address is issued for one clock; for
// a read the data arrive CAS_LAT clocks later, for a write the data are
// driven in the clocks right after the command.  A burst is BURST_LEN = 4
// words, moved two words per clock, so the data phase lasts two clocks; during
// it rd_beat / wr_beat tell the DDR interface to take or supply a word pair.
// A periodic REFRESH is inserted between bursts every REF_PERIOD clocks.
// Interface: req/req_we/req_addr accepted when req_ready; req_done pulses in
// the last data clock of the burst.
// Following the source design: its place between the main controller and the
// memory, burst length 4.  This design's own choice: the reduced command set
// (no row activation or mode register), the timing and the refresh scheme.
module sdram_ctrl
  import dwt_pkg::*;
#(
  parameter int ADDR_W     = 24,
  parameter int CAS_LAT    = 2,
  parameter int REF_PERIOD = 780,   // 7.8 us at 100 MHz
  parameter int T_RFC      = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // main controller side
  output logic              init_done,
  input  logic              req,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  output logic              req_ready,
  output logic              req_done,
  // DDR interface side
  output logic              rd_beat,
  output logic              wr_beat,
  // memory side
  input  logic              mem_ready,
  output mem_cmd_e          mem_cmd,
  output logic [ADDR_W-1:0] mem_addr
);
  typedef enum logic [2:0] {S_INIT, S_IDLE, S_RD, S_WR, S_REF} state_e;
  state_e state;
  logic [7:0] cnt;
  logic [$clog2(REF_PERIOD+1)-1:0] ref_cnt;
  logic ref_due;

  assign init_done = (state != S_INIT);
  assign req_ready = (state == S_IDLE) && !ref_due;
  assign rd_beat   = (state == S_RD) && (cnt >= 8'(CAS_LAT)) && (cnt < 8'(CAS_LAT + BEATS));
  assign wr_beat   = (state == S_WR) && (cnt >= 8'd1) && (cnt <= 8'(BEATS));
  assign req_done  = ((state == S_RD) && (cnt == 8'(CAS_LAT + BEATS - 1))) ||
                     ((state == S_WR) && (cnt == 8'(BEATS)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_INIT; cnt <= '0; ref_cnt <= '0; ref_due <= 1'b0;
      mem_cmd <= MEM_NOP; mem_addr <= '0;
    end else begin
      mem_cmd <= MEM_NOP;
      if (state != S_INIT) begin
        if (ref_cnt == ($bits(ref_cnt))'(REF_PERIOD - 1)) begin
          ref_cnt <= '0; ref_due <= 1'b1;
        end else ref_cnt <= ref_cnt + 1'b1;
      end
      unique case (state)
        S_INIT: if (mem_ready) state <= S_IDLE;
        S_IDLE: begin
          cnt <= '0;
          if (ref_due) begin
            mem_cmd <= MEM_REFRESH; ref_due <= 1'b0; state <= S_REF;
          end else if (req) begin
            mem_cmd  <= req_we ? MEM_WRITE : MEM_READ;
            mem_addr <= req_addr;
            state    <= req_we ? S_WR : S_RD;
          end
        end
        S_RD, S_WR: begin
          cnt <= cnt + 1'b1;
          if (req_done) state <= S_IDLE;
        end
        S_REF: begin
          cnt <= cnt + 1'b1;
          if (cnt == 8'(T_RFC - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) req_done |-> state inside {S_RD, S_WR});
  assert property (@(posedge clk) disable iff (!rst_n) !(rd_beat && wr_beat));
endmodule
