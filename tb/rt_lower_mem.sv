// rt_lower_mem: behavioural model of the next memory level, for testbenches.
//
// Takes one line request at a time (req_ready is high while idle), and LAT
// clock cycles later presents the whole line for one cycle on resp_valid /
// resp_data, word i of the line in bits [32*i +: 32]. The content is
// rt_tb_pkg::mem_word() of each word address. Counts the requests it served.
module rt_lower_mem #(
  parameter int unsigned LINE_WORDS = 4,
  parameter int unsigned LAT        = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     req_valid,
  output logic                     req_ready,
  input  logic [31:0]              req_addr,
  output logic                     resp_valid,
  output logic [LINE_WORDS*32-1:0] resp_data,
  output int unsigned              n_requests
);
  logic        busy;
  int unsigned cnt;
  logic [31:0] addr_q;

  assign req_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      cnt        <= 0;
      addr_q     <= '0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
      n_requests <= 0;
    end else begin
      resp_valid <= 1'b0;
      if (!busy && req_valid) begin
        busy       <= 1'b1;
        cnt        <= LAT;
        addr_q     <= req_addr;
        n_requests <= n_requests + 1;
      end else if (busy) begin
        if (cnt <= 1) begin
          busy       <= 1'b0;
          resp_valid <= 1'b1;
          for (int i = 0; i < LINE_WORDS; i++)
            resp_data[32*i +: 32] <= rt_tb_pkg::mem_word(addr_q + 32'(4 * i));
        end else begin
          cnt <= cnt - 1;
        end
      end
    end
  end
endmodule
