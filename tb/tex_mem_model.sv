// Behavioural model of texture memory for the testbenches (not synthesizable
// RTL). It accepts one line request at a time, sometimes holding req_ready low
// for a few cycles, and returns the whole 64-byte line LATENCY cycles later.
// Every texel's content is a fixed function of its byte address, so a checker
// can predict any texel: value = (addr >> 2) * 0x9E3779B1 ^ 0x5A5A5A5A.
module tex_mem_model #(
  parameter int unsigned LATENCY = 6,
  parameter bit          STALLS  = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_valid,
  output logic         req_ready,
  input  logic [31:0]  req_addr,
  output logic         rsp_valid,
  output logic [511:0] rsp_line,
  output int           n_requests,
  output int           n_stalls
);
  typedef enum logic [1:0] {M_IDLE, M_BUSY, M_RESP} mstate_e;
  mstate_e     st;
  int          cnt;
  logic [31:0] line_addr;

  function automatic logic [31:0] texel_value(logic [31:0] a);
    return ((a >> 2) * 32'h9E37_79B1) ^ 32'h5A5A_5A5A;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= M_IDLE; cnt <= 0; req_ready <= 1'b0; rsp_valid <= 1'b0; rsp_line <= '0;
      line_addr <= '0; n_requests <= 0; n_stalls <= 0;
    end else begin
      rsp_valid <= 1'b0;
      case (st)
        M_IDLE: begin
          if (req_valid && req_ready) begin
            st <= M_BUSY; cnt <= LATENCY; line_addr <= req_addr; req_ready <= 1'b0;
            n_requests <= n_requests + 1;
          end else if (req_valid) begin
            // hold off some requests for a cycle or more
            if (STALLS && ($urandom % 3 == 0)) n_stalls <= n_stalls + 1;
            else req_ready <= 1'b1;
          end
        end
        M_BUSY: if (cnt <= 1) st <= M_RESP; else cnt <= cnt - 1;
        default: begin
          rsp_valid <= 1'b1;
          for (int k = 0; k < 16; k++)
            rsp_line[32*k +: 32] <= texel_value({line_addr[31:6], 6'b0} + 32'(4 * k));
          st <= M_IDLE;
        end
      endcase
    end
endmodule
