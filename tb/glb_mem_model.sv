// glb_mem_model: behavioural model of a memory controller with its DRAM, for simulation only.
//
// Takes one request at a time on the valid/ready request port (address, write flag, burst
// length - 1, write burst). After LAT cycles it answers: a read with len+1 beats, a write with
// a single acknowledge beat, both on the valid/ready response port with last on the final
// beat. Storage is sparse (an associative array keyed by word address); a word never written
// reads as pattern(addr) = addr ^ 32'h5A5A_5A5A, so testbenches can predict read data.
// The default LAT of 6 cycles stands for the precharge, activate and CAS delays of 2 cycles
// each of the DRAM the design is meant for.
module glb_mem_model #(
  parameter int unsigned LAT = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_write,
  input  logic [31:0] req_addr,
  input  logic [2:0]  req_len,
  input  logic [31:0] req_wdata [8],
  output logic        rsp_valid,
  input  logic        rsp_ready,
  output logic [31:0] rsp_data,
  output logic        rsp_last
);
  logic [31:0] mem [logic [29:0]];
  typedef enum logic [1:0] {M_IDLE, M_WAIT, M_RESP} m_state_e;
  m_state_e    st;
  int unsigned wait_cnt;
  logic        c_write;
  logic [31:0] c_addr;
  logic [2:0]  c_len;
  logic [2:0]  beat;

  function automatic logic [31:0] word_at(input logic [31:0] a);
    return mem.exists(a[31:2]) ? mem[a[31:2]] : (a ^ 32'h5A5A_5A5A);
  endfunction

  assign req_ready = (st == M_IDLE);
  assign rsp_valid = (st == M_RESP);
  assign rsp_data  = c_write ? 32'h0 : word_at(c_addr + 32'(beat) * 4);
  assign rsp_last  = c_write || (beat == c_len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE;
      wait_cnt <= 0;
      beat <= '0;
      c_write <= 1'b0;
      c_addr <= '0;
      c_len <= '0;
    end else begin
      case (st)
        M_IDLE: if (req_valid) begin
          c_write  <= req_write;
          c_addr   <= req_addr;
          c_len    <= req_len;
          beat     <= '0;
          wait_cnt <= LAT;
          st       <= M_WAIT;
          if (req_write)
            for (int b = 0; b <= int'(req_len); b++)
              mem[req_addr[31:2] + 30'(b)] = req_wdata[b];
        end
        M_WAIT: begin
          if (wait_cnt <= 1) st <= M_RESP;
          wait_cnt <= wait_cnt - 1;
        end
        M_RESP: if (rsp_ready) begin
          if (rsp_last) st <= M_IDLE;
          else          beat <= beat + 1'b1;
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
