100c1
140c0
683bd
101c0
102c1
480be
481bf
17dc0
17ec1
283bd
17dc0
17fc1
283bd
17dc0
160c1
283be
17ac0
17ec1
28340
100c0
140c1
683bd
583be
17dc0
17ec1
383bf
100c1
141c0
683bd
101c0
102c1
480be
17dc0
283bd
17dc0
17ec1
283bd
17dc0
17fc1
283bd
17dc0
160c1
283be
17bc0
17ec1
28340
100c0
140c1
683bd
583be
17dc0
17ec1
383bf
100c1
141c0
683bd
17fc0
17dc1
283bd
101c0
17dc1
283bd
102c0
480be
17dc0
17ec1
283bd
100c0
141c1
683be
583bf
17ec0
17fc1
383be
17dc0
17ec1
383bd
17dc0
160c1
283be
17cc0
17ec1
28340
17dc0
180a0
14200
14301
08040
17dc0
180a0
14400
14501
08040
17dc0
180a0
14600
14701
08040
