// ddr_sdram_model: behavioural model of the external DDR SDRAM for the
// testbenches (not synthesizable).  It speaks the simplified command
// interface of sdram_ctrl: after INIT_CYC clocks it raises `ready`; a READ
// returns the 4-word burst at the command address as two word pairs in the
// CAS_LAT-th and following clock after the command; a WRITE stores the word
// pairs present in the two clocks after the command.  Before rst_n rises
// (memory reset) it ignores the bus.  It counts commands and
// flags misaligned or out-of-range bursts and refresh gaps longer than
// MAX_REF_GAP clocks.
module ddr_sdram_model
  import dwt_pkg::*;
#(
  parameter int WORDS       = 16384,
  parameter int ADDR_W      = 24,
  parameter int CAS_LAT     = 2,
  parameter int INIT_CYC    = 20,
  parameter int MAX_REF_GAP = 1000
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              ready,
  input  mem_cmd_e          cmd,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] dq_in  [2],
  output logic [DATA_W-1:0] dq_out [2]
);
  logic [DATA_W-1:0] mem [WORDS];
  longint cyc = 0;
  longint rd_t = -100, wr_t = -100, last_ref = 0;
  int rd_a, wr_a;
  int n_read = 0, n_write = 0, n_ref = 0, errors = 0;

  initial begin
    ready = 1'b0;
    dq_out[0] = '0; dq_out[1] = '0;
    foreach (mem[i]) mem[i] = '0;
  end

  always @(posedge clk) if (rst_n) begin
    // write data of the clock that just ended
    if (cyc == wr_t + 1 || cyc == wr_t + 2) begin
      mem[wr_a + 2 * int'(cyc - wr_t - 1)]     = dq_in[0];
      mem[wr_a + 2 * int'(cyc - wr_t - 1) + 1] = dq_in[1];
    end
    if (cmd != MEM_NOP && !ready) begin errors++; $display("MEM: command before ready"); end
    if (cmd == MEM_READ || cmd == MEM_WRITE) begin
      if (addr % BURST_LEN != 0 || int'(addr) + BURST_LEN > WORDS) begin
        errors++;
        $display("MEM: bad burst address %0d", addr);
      end
      if (cmd == MEM_READ) begin rd_t = cyc; rd_a = int'(addr) % WORDS; n_read++; end
      else                 begin wr_t = cyc; wr_a = int'(addr) % WORDS; n_write++; end
    end
    if (cmd == MEM_REFRESH) begin n_ref++; last_ref = cyc; end
    if (ready && cyc - last_ref > MAX_REF_GAP) begin
      errors++; last_ref = cyc; $display("MEM: refresh interval exceeded");
    end
    cyc++;
    if (cyc == INIT_CYC) begin ready <= 1'b1; last_ref = cyc; end
    // read data for the clock that now starts
    if (cyc >= rd_t + CAS_LAT && cyc < rd_t + CAS_LAT + BEATS) begin
      dq_out[0] <= mem[rd_a + 2 * int'(cyc - rd_t - CAS_LAT)];
      dq_out[1] <= mem[rd_a + 2 * int'(cyc - rd_t - CAS_LAT) + 1];
    end else begin
      dq_out[0] <= '0; dq_out[1] <= '0;
    end
  end
endmodule
