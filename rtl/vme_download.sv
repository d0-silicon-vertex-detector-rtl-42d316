// vme_download: VME interface that downloads the SVX-II chip strings.
//
// The SVX-II chips on each HDI form one serial chain (182 bits per chip, up
// to ten chips).  The VME bus is parallel, so one write can carry one bit
// for each of N_BITS HDIs; software serialises and collates the data.  The
// interface is write-only and has two registers:
//   BASE_ADDR     control: bit 0 = download enable (`dnld_en`), which puts the
//                 main state machines into initialize mode;
//   BASE_ADDR+1   data: bits N_BITS-1..0 are the next serial bit of each HDI.
// The data bits appear on `sdata` one clock before DTACK, and DTACK of a
// data write is also the download clock (`dnld_clk`) of every chain, so the
// chips shift on its rising edge.  Any other cycle addressed to the card is
// acknowledged with no effect.
// The VME strobes are synchronised to `clk` with two flip-flops; DTACK is
// released after DS is released.  The document gives the idea (parallel
// write, DTACK as clock, one address for all HDIs); register map, widths and
// timing are this design's choices.
module vme_download #(
  parameter int unsigned N_BITS    = 8,
  parameter int unsigned ADDR_W    = 8,
  parameter logic [ADDR_W-1:0] BASE_ADDR = '0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              as_n,
  input  logic              ds_n,
  input  logic              write_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic [15:0]       data,
  output logic              dtack_n,
  output logic              dnld_en,
  output logic [N_BITS-1:0] sdata,
  output logic              dnld_clk
);
  typedef enum logic [1:0] {V_IDLE, V_WRITE, V_ACK} vstate_e;

  vstate_e     state;
  logic [1:0]  as_s, ds_s;
  logic        strobe, hit, is_data;

  assign strobe = !as_s[1] && !ds_s[1];
  assign hit    = (addr == BASE_ADDR) || (addr == BASE_ADDR + 1'b1);

  always_ff @(posedge clk) begin
    if (rst) begin
      as_s    <= 2'b11;
      ds_s    <= 2'b11;
      state   <= V_IDLE;
      dnld_en <= 1'b0;
      sdata   <= '0;
      is_data <= 1'b0;
    end else begin
      as_s <= {as_s[0], as_n};
      ds_s <= {ds_s[0], ds_n};
      unique case (state)
        V_IDLE:
          if (strobe && hit) begin
            state   <= V_WRITE;
            is_data <= !write_n && (addr == BASE_ADDR + 1'b1);
            if (!write_n) begin
              if (addr == BASE_ADDR) dnld_en <= data[0];
              else                   sdata   <= data[N_BITS-1:0];
            end
          end
        V_WRITE: state <= V_ACK;
        V_ACK:   if (ds_s[1]) begin
                   state   <= V_IDLE;
                   is_data <= 1'b0;
                 end
        default: state <= V_IDLE;
      endcase
    end
  end

  assign dtack_n  = (state != V_ACK);
  assign dnld_clk = (state == V_ACK) && is_data;
endmodule
